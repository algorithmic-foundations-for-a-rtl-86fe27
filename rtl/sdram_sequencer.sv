// sdram_sequencer: SDRAM command issue for one bank controller.
//
// Accepts one word access at a time (slot, row, column, read/write, tag) and
// drives the DRAM bank's command pins. The open row is kept open after an
// access (open-page policy): an access to the open row (a row hit) needs only
// a column command and is accepted at once, so row hits stream at one word per
// cycle; an access to another row first precharges (T_RP cycles), then
// activates the new row (T_RCD cycles before the column command). Read data
// arrive T_CL cycles after the READ command; a tag pipeline of the same depth
// brings each read's tag out together with the data.
//
// A physical bank may be built from SLOTS memory slots (groups of DRAM chips
// added to grow capacity) that share the command, address and data pins. The
// sequencer keeps one current-row register per slot and drives a one-hot chip
// select, so an access to another slot whose row is already open is still a
// row hit and needs no precharge.
//
// Follows the paper: RAS latency 2 and CAS latency 2 cycles, row hits need
// only a CAS, a different row must be closed and precharged first, and one
// controller serving several slots with a current-row register per slot. This
// design's own choices: open-page policy, single-word (burst length 1) column
// accesses, T_RP = 2, one row buffer per slot (no SDRAM internal banks), and
// one wait counter shared by all slots.
//
// Timing: an ACT issued on one clock edge allows the column command on the
// edge T_RCD later. ret_valid/ret_tag/ret_data are combinational from the
// tag pipeline and the SDRAM data pins, T_CL edges after the READ edge.
// Handshake: a request is taken on an edge where req_valid && req_ready; it
// must stay stable until then. Reset is synchronous and active low; no
// command leaves while it is asserted.
//
// sd_row, sd_col and sd_wdata are the request's fields wired to the pins:
// the sequencer only decides which command goes out with them.
module sdram_sequencer
  import pva_pkg::*;
#(
  parameter int T_RCD = 2,
  parameter int T_CL  = 2,
  parameter int T_RP  = 2,
  parameter int TAG_W = IDX_W,
  parameter int SLOTS = 1,
  localparam int SLOT_W = (SLOTS > 1) ? $clog2(SLOTS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // word access requests
  input  logic              req_valid,
  output logic              req_ready,
  input  logic              req_write,
  input  logic [SLOT_W-1:0] req_slot,
  input  row_t              req_row,
  input  col_t              req_col,
  input  data_t             req_wdata,
  input  logic [TAG_W-1:0]  req_tag,
  // read data return
  output logic              ret_valid,
  output logic [TAG_W-1:0]  ret_tag,
  output data_t             ret_data,
  output logic              idle,        // nothing waiting, no read in flight
  // event strobes (statistics)
  output logic              ev_row_hit,  // column command on an already open row
  output logic              ev_row_miss, // precharge of another row needed
  // SDRAM pins
  output sd_cmd_e           sd_cmd,
  output logic [SLOTS-1:0]  sd_cs,       // chip select, one-hot with a command
  output row_t              sd_row,
  output col_t              sd_col,
  output data_t             sd_wdata,
  input  data_t             sd_rdata
);
  localparam int CNT_W = $clog2((T_RCD > T_RP ? T_RCD : T_RP) + 1);

  logic [SLOTS-1:0] row_open;
  row_t             open_row [SLOTS];
  logic [SLOTS-1:0] fresh;          // row was opened for the access now waiting
  logic [CNT_W-1:0] wait_cnt;
  logic [T_CL-1:0]  pipe_v;
  logic [TAG_W-1:0] pipe_tag [T_CL];

  logic slot_open, row_match;
  assign slot_open = row_open[req_slot];
  assign row_match = slot_open && (open_row[req_slot] == req_row);
  assign req_ready = (wait_cnt == '0) && row_match;

  always_comb begin
    sd_cmd   = SD_NOP;
    sd_row   = req_row;
    sd_col   = req_col;
    sd_wdata = req_wdata;
    if (rst_n && req_valid && wait_cnt == '0) begin   // nothing during reset
      if (row_match)      sd_cmd = req_write ? SD_WRITE : SD_READ;
      else if (slot_open) sd_cmd = SD_PRE;
      else                sd_cmd = SD_ACT;
    end
    sd_cs = '0;
    if (sd_cmd != SD_NOP) sd_cs[req_slot] = 1'b1;
  end

  assign ev_row_hit  = (sd_cmd == SD_READ || sd_cmd == SD_WRITE) && !fresh[req_slot];
  assign ev_row_miss = (sd_cmd == SD_PRE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      row_open <= '0;
      fresh    <= '0;
      wait_cnt <= '0;
      for (int i = 0; i < SLOTS; i++) open_row[i] <= '0;
    end else begin
      if (wait_cnt != '0) wait_cnt <= wait_cnt - 1'b1;
      unique case (sd_cmd)
        SD_PRE: begin
          row_open[req_slot] <= 1'b0;
          wait_cnt           <= CNT_W'(T_RP - 1);
        end
        SD_ACT: begin
          row_open[req_slot] <= 1'b1;
          open_row[req_slot] <= req_row;
          fresh[req_slot]    <= 1'b1;
          wait_cnt           <= CNT_W'(T_RCD - 1);
        end
        SD_READ, SD_WRITE: fresh[req_slot] <= 1'b0;
        default: ;
      endcase
    end
  end

  // Read tag pipeline, one stage per cycle of CAS latency.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pipe_v <= '0;
      for (int i = 0; i < T_CL; i++) pipe_tag[i] <= '0;
    end else begin
      pipe_v[0]   <= (sd_cmd == SD_READ);
      pipe_tag[0] <= req_tag;
      for (int i = 1; i < T_CL; i++) begin
        pipe_v[i]   <= pipe_v[i-1];
        pipe_tag[i] <= pipe_tag[i-1];
      end
    end
  end

  assign ret_valid = pipe_v[T_CL-1];
  assign ret_tag   = pipe_tag[T_CL-1];
  assign ret_data  = sd_rdata;
  assign idle      = !req_valid && (pipe_v == '0);

  // A request must stay stable until it is taken.
  property p_req_stable;
    @(posedge clk) disable iff (!rst_n)
      req_valid && !req_ready |=> req_valid && $stable(req_row) && $stable(req_col)
                                 && $stable(req_write) && $stable(req_slot);
  endproperty
  a_req_stable: assert property (p_req_stable);
endmodule
