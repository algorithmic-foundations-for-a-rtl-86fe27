// pva_top: a Parallel Vector Access (PVA) memory controller subsystem.
//
// The processor asks for base-stride vectors <B, S, L>; the subsystem gathers
// (or scatters) exactly those words from a memory of M_PHYS SDRAM banks that
// are interleaved in blocks of N_WORDS words, and answers with one dense cache
// line. The vector command unit (VCU) issues each vector on the vector bus;
// all M_PHYS bank controllers receive it at once, each computes by itself
// which elements are in its bank (FirstHit/NextHit over N_WORDS word-wide
// logical banks) and drives its own SDRAM, so the banks work in parallel.
//
// Default configuration: 8 physical banks, 16-word interleave (one 16-word
// cache line per bank block), as in the 8-bank cache-line-interleaved memory
// of the paper's timing examples; RAS and CAS latency 2 cycles. Its
// organisation (VCU, vector bus, one bank controller per DRAM bank) is the
// paper's block diagram. The DRAM banks themselves are outside: their command,
// chip-select, address and data pins are ports (sd_*), one entry per bank.
// SLOTS > 1 builds each bank from several memory slots, each with its own chip
// select and its own open row (the top address bits pick the slot).
// FH_STYLE chooses how the controllers build FirstHit (see bank_controller).
//
// Interface: one request at a time (req_valid/req_ready handshake), answered
// by a one-cycle resp_valid with the gathered line (or the scatter's
// completion). The ev_* outputs are event strobes for performance counting.
// Reset is synchronous and active low.
module pva_top
  import pva_pkg::*;
#(
  parameter int M_PHYS    = 8,
  parameter int N_WORDS   = 16,
  parameter int PAGE_BITS = 20,
  parameter int T_RCD     = 2,
  parameter int T_CL      = 2,
  parameter int T_RP      = 2,
  parameter int SLOTS     = 1,
  parameter int FH_STYLE  = 0    // FirstHit build inside each bank controller
) (
  input  logic    clk,
  input  logic    rst_n,
  // system bus
  input  logic    req_valid,
  output logic    req_ready,
  input  logic    req_write,
  input  addr_t   req_base,
  input  addr_t   req_stride,
  input  len_t    req_len,
  input  data_t   req_wdata [LMAX],
  output logic    resp_valid,
  output logic    resp_write,
  output data_t   resp_rdata [LMAX],
  // DRAM banks
  output sd_cmd_e sd_cmd   [M_PHYS],
  output logic [SLOTS-1:0] sd_cs [M_PHYS],
  output row_t    sd_row   [M_PHYS],
  output col_t    sd_col   [M_PHYS],
  output data_t   sd_wdata [M_PHYS],
  input  data_t   sd_rdata [M_PHYS],
  // event strobes
  output logic    ev_split,
  output logic    ev_access   [M_PHYS],
  output logic    ev_row_hit  [M_PHYS],
  output logic    ev_row_miss [M_PHYS]
);
  logic              issue_valid, issue_ready, op_done, bc_cmd_valid;
  vec_cmd_t          issue_cmd, bc_cmd;
  logic [M_PHYS-1:0] bc_busy;
  data_t             wline [LMAX];
  logic              ret_valid [M_PHYS];
  idx_t              ret_idx   [M_PHYS];
  data_t             ret_data  [M_PHYS];

  vector_command_unit #(.N_BC(M_PHYS), .PAGE_BITS(PAGE_BITS)) u_vcu (
    .clk             (clk),
    .rst_n           (rst_n),
    .req_valid       (req_valid),
    .req_ready       (req_ready),
    .req_write       (req_write),
    .req_base        (req_base),
    .req_stride      (req_stride),
    .req_len         (req_len),
    .req_wdata       (req_wdata),
    .resp_valid      (resp_valid),
    .resp_write      (resp_write),
    .resp_rdata      (resp_rdata),
    .bus_issue_valid (issue_valid),
    .bus_issue_ready (issue_ready),
    .bus_issue_cmd   (issue_cmd),
    .bus_op_done     (op_done),
    .wline           (wline),
    .ret_valid       (ret_valid),
    .ret_idx         (ret_idx),
    .ret_data        (ret_data),
    .ev_split        (ev_split)
  );

  vector_bus #(.N_BC(M_PHYS)) u_bus (
    .clk          (clk),
    .rst_n        (rst_n),
    .issue_valid  (issue_valid),
    .issue_ready  (issue_ready),
    .issue_cmd    (issue_cmd),
    .op_done      (op_done),
    .bc_cmd_valid (bc_cmd_valid),
    .bc_cmd       (bc_cmd),
    .bc_busy      (bc_busy)
  );

  for (genvar p = 0; p < M_PHYS; p++) begin : g_bc
    bank_controller #(
      .M_PHYS (M_PHYS), .N_WORDS (N_WORDS), .BANK (p),
      .T_RCD  (T_RCD),  .T_CL    (T_CL),    .T_RP (T_RP), .SLOTS (SLOTS),
      .FH_STYLE (FH_STYLE)
    ) u_bc (
      .clk         (clk),
      .rst_n       (rst_n),
      .cmd_valid   (bc_cmd_valid),
      .cmd         (bc_cmd),
      .wline       (wline),
      .busy        (bc_busy[p]),
      .ret_valid   (ret_valid[p]),
      .ret_idx     (ret_idx[p]),
      .ret_data    (ret_data[p]),
      .ev_access   (ev_access[p]),
      .ev_row_hit  (ev_row_hit[p]),
      .ev_row_miss (ev_row_miss[p]),
      .sd_cmd      (sd_cmd[p]),
      .sd_cs       (sd_cs[p]),
      .sd_row      (sd_row[p]),
      .sd_col      (sd_col[p]),
      .sd_wdata    (sd_wdata[p]),
      .sd_rdata    (sd_rdata[p])
    );
  end
endmodule
