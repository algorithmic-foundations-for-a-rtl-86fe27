// vector_command_unit: the Vector Command Unit (VCU) between the system bus and
// the vector bus.
//
// It takes one base-stride request <B, S, L> at a time (L up to one cache line)
// and answers it with a dense cache line. For a gather it clears a line
// buffer, issues the vector on the vector bus, and writes every word the bank
// controllers return into the line at the position they report. For a scatter
// it loads the line buffer with the dense data; the bank controllers pick
// their words out of it by index. A vector that leaves its superpage is cut
// into pieces with page_splitter and the pieces are issued one after another,
// each carrying the line position of its first element.
//
// From the paper: the VCU's role (requests from the system bus, vector
// commands to the bank controllers, results back as cache lines) and the
// superpage split. This design's own choices: the request/response signals,
// one request at a time, responses without back-pressure, and the line buffer
// with one write port per bank controller.
//
// Timing: a request is taken on an edge with req_valid && req_ready; resp_valid
// is high for one cycle, with the whole line on resp_rdata (gathers) and for
// scatters once every word has been written. Reset is synchronous, active low.
module vector_command_unit
  import pva_pkg::*;
#(
  parameter int N_BC      = 8,
  parameter int PAGE_BITS = 20
) (
  input  logic     clk,
  input  logic     rst_n,
  // system bus side
  input  logic     req_valid,
  output logic     req_ready,
  input  logic     req_write,
  input  addr_t    req_base,
  input  addr_t    req_stride,
  input  len_t     req_len,
  input  data_t    req_wdata [LMAX],
  output logic     resp_valid,
  output logic     resp_write,
  output data_t    resp_rdata [LMAX],
  // vector bus side
  output logic     bus_issue_valid,
  input  logic     bus_issue_ready,
  output vec_cmd_t bus_issue_cmd,
  input  logic     bus_op_done,
  output data_t    wline [LMAX],
  // words gathered by the bank controllers
  input  logic     ret_valid [N_BC],
  input  idx_t     ret_idx   [N_BC],
  input  data_t    ret_data  [N_BC],
  // statistics
  output logic     ev_split        // a piece was issued that ends at a superpage
);
  typedef enum logic [1:0] {ST_IDLE, ST_ISSUE, ST_WAIT, ST_RESP} state_e;
  state_e state;

  logic  write_q;
  addr_t base_q, stride_q;
  len_t  rem_q;
  idx_t  offset_q;
  data_t line [LMAX];

  len_t  count, rest;
  addr_t next_base;
  logic  split;

  page_splitter #(.PAGE_BITS(PAGE_BITS)) u_split (
    .base      (base_q),
    .stride    (stride_q),
    .len       (rem_q),
    .count     (count),
    .next_base (next_base),
    .rest      (rest),
    .split     (split)
  );

  assign req_ready       = (state == ST_IDLE);
  assign bus_issue_valid = (state == ST_ISSUE);
  assign bus_issue_cmd   = '{write: write_q, base: base_q, stride: stride_q,
                             len: count, offset: offset_q};
  assign ev_split        = bus_issue_valid && bus_issue_ready && split;
  assign resp_valid      = (state == ST_RESP);
  assign resp_write      = write_q;
  assign resp_rdata      = line;
  assign wline           = line;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= ST_IDLE;
      write_q  <= 1'b0;
      base_q   <= '0;
      stride_q <= '0;
      rem_q    <= '0;
      offset_q <= '0;
      for (int i = 0; i < LMAX; i++) line[i] <= '0;
    end else begin
      unique case (state)
        ST_IDLE: if (req_valid) begin
          write_q  <= req_write;
          base_q   <= req_base;
          stride_q <= req_stride;
          rem_q    <= req_len;
          offset_q <= '0;
          for (int i = 0; i < LMAX; i++) line[i] <= req_write ? req_wdata[i] : '0;
          state    <= (req_len == '0) ? ST_RESP : ST_ISSUE;
        end
        ST_ISSUE: if (bus_issue_ready) begin
          base_q   <= next_base;
          rem_q    <= rest;
          offset_q <= offset_q + idx_t'(count);
          state    <= ST_WAIT;
        end
        ST_WAIT: if (bus_op_done) state <= (rem_q == '0) ? ST_RESP : ST_ISSUE;
        ST_RESP: state <= ST_IDLE;
        default: state <= ST_IDLE;
      endcase
      // gathered words land at the line position the controller reports
      for (int b = 0; b < N_BC; b++)
        if (ret_valid[b]) line[ret_idx[b]] <= ret_data[b];
    end
  end

  a_len_max: assert property (@(posedge clk) disable iff (!rst_n)
    req_valid && req_ready |-> req_len <= len_t'(LMAX));
endmodule
