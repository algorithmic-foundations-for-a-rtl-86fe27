// tb_sdram_sequencer: drives word accesses into the SDRAM sequencer with an
// SDRAM bank model attached and checks data, tags, protocol and timing:
//   - a read to a closed bank returns T_RCD + T_CL cycles after the request,
//   - reads to the open row are taken one per cycle (row hits),
//   - a read to another row costs T_RP + T_RCD extra cycles (row miss),
//   - written words read back, untouched words read their initial pattern,
//   - with two memory slots, each slot keeps its own open row: going back and
//     forth between the open rows of both slots costs no precharge.
module tb_sdram_sequencer;
  import pva_pkg::*;
  localparam int T_RCD = 2, T_CL = 2, T_RP = 2, SLOTS = 2;
  localparam int SLOT1 = 1 << 19;   // row bit that selects slot 1 in bank 0 of 8

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic  req_valid = 1'b0, req_ready, req_write = 1'b0, req_slot = 1'b0;
  logic [SLOTS-1:0] sd_cs;
  row_t  req_row = '0;
  col_t  req_col = '0;
  data_t req_wdata = '0;
  idx_t  req_tag = '0;
  logic  ret_valid, idle, ev_row_hit, ev_row_miss;
  idx_t  ret_tag;
  data_t ret_data, sd_wdata, sd_rdata;
  sd_cmd_e sd_cmd;
  row_t  sd_row;
  col_t  sd_col;
  int    violations, n_act, n_pre;

  sdram_sequencer #(.T_RCD(T_RCD), .T_CL(T_CL), .T_RP(T_RP), .SLOTS(SLOTS)) dut (
    .clk, .rst_n, .req_valid, .req_ready, .req_write, .req_slot, .req_row, .req_col, .req_wdata,
    .req_tag, .ret_valid, .ret_tag, .ret_data, .idle, .ev_row_hit, .ev_row_miss,
    .sd_cmd, .sd_cs, .sd_row, .sd_col, .sd_wdata, .sd_rdata);

  // bank 0 of an 8 x 16 memory: local address == global with bank bits 0
  sdram_bank_model #(.M_PHYS(8), .N_WORDS(16), .BANK(0), .T_RCD(T_RCD), .T_CL(T_CL), .T_RP(T_RP),
                   .SLOTS(SLOTS))
    mem (.clk, .sd_cmd, .sd_cs, .sd_row, .sd_col, .sd_wdata, .sd_rdata, .violations, .n_act, .n_pre);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic data_t init_word(addr_t a);
    return (a * 32'h9E37_79B1) ^ 32'h0F0F_1234;
  endfunction
  function automatic addr_t gaddr(int row, int col);
    addr_t loc = addr_t'(row * (1 << COL_W) + col);
    return ((loc >> 4) << 7) | (loc & 32'hF);
  endfunction

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // expected returns, in order
  idx_t  exp_tag [$];
  data_t exp_data [$];
  int    ret_cyc [$];
  int    hits = 0, misses = 0;
  always @(posedge clk) begin
    if (ev_row_hit) hits++;
    if (ev_row_miss) misses++;
    if (rst_n && ret_valid) begin
      check(exp_tag.size() > 0, "unexpected return");
      if (exp_tag.size() > 0) begin
        idx_t t;
        data_t d;
        t = exp_tag.pop_front();
        d = exp_data.pop_front();
        check(ret_tag == t && ret_data == d,
              $sformatf("return tag %0d data %h, want %0d %h", ret_tag, ret_data, t, d));
        ret_cyc.push_back(cyc);
      end
    end
  end

  // issue one access; returns the cycle in which it was taken
  task automatic access(bit wr, int row, int col, data_t wd, int tag, output int taken);
    req_valid <= 1'b1;
    req_write <= wr;
    req_slot  <= (row >= SLOT1);
    req_row   <= row_t'(row);
    req_col   <= col_t'(col);
    req_wdata <= wd;
    req_tag   <= idx_t'(tag);
    @(posedge clk);
    while (!req_ready) @(posedge clk);
    taken = cyc;
    req_valid <= 1'b0;
  endtask

  initial begin
    int t0, t, first_taken, last_taken;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    // read to a closed bank
    t0 = cyc;
    exp_tag.push_back(idx_t'(1)); exp_data.push_back(init_word(gaddr(5, 3)));
    access(0, 5, 3, '0, 1, t);
    wait (ret_cyc.size() == 1);
    check(ret_cyc[0] - t0 == T_RCD + T_CL + 1,
          $sformatf("closed-row read latency %0d, want %0d", ret_cyc[0] - t0, T_RCD + T_CL + 1));
    // eight row hits back to back: one per cycle
    for (int i = 0; i < 8; i++) begin
      exp_tag.push_back(idx_t'(i)); exp_data.push_back(init_word(gaddr(5, 10 + i)));
    end
    req_valid <= 1'b1;
    req_write <= 1'b0;
    req_row   <= row_t'(5);
    for (int i = 0; i < 8; i++) begin
      req_col <= col_t'(10 + i);
      req_tag <= idx_t'(i);
      @(posedge clk);
      check(req_ready, $sformatf("row hit %0d not taken at once", i));
    end
    req_valid <= 1'b0;
    wait (ret_cyc.size() == 9);
    check(ret_cyc[8] - ret_cyc[1] == 7, "row-hit returns not one per cycle");
    // row miss: precharge + activate before the column command
    @(posedge clk);
    t0 = cyc;
    exp_tag.push_back(idx_t'(3)); exp_data.push_back(init_word(gaddr(9, 0)));
    access(0, 9, 0, '0, 3, t);
    wait (ret_cyc.size() == 10);
    check(ret_cyc[9] - t0 == T_RP + T_RCD + T_CL + 1,
          $sformatf("row-miss read latency %0d, want %0d", ret_cyc[9] - t0, T_RP + T_RCD + T_CL + 1));
    // writes, then read back, across rows
    access(1, 9, 7, 32'hCAFE_0001, 0, t);
    access(1, 12, 1, 32'hCAFE_0002, 0, t);
    exp_tag.push_back(idx_t'(4)); exp_data.push_back(32'hCAFE_0001);
    access(0, 9, 7, '0, 4, first_taken);
    exp_tag.push_back(idx_t'(5)); exp_data.push_back(32'hCAFE_0002);
    access(0, 12, 1, '0, 5, last_taken);
    check(last_taken - first_taken == T_RP + T_RCD + 1, "row change between reads");
    wait (ret_cyc.size() == 12);
    // second slot: its own row register, no precharge when switching slots
    exp_tag.push_back(idx_t'(6)); exp_data.push_back(init_word(gaddr(SLOT1 + 7, 2)));
    access(0, SLOT1 + 7, 2, '0, 6, first_taken);      // slot 1 closed: ACT only
    exp_tag.push_back(idx_t'(7)); exp_data.push_back(init_word(gaddr(12, 3)));
    access(0, 12, 3, '0, 7, t);                       // slot 0 row 12 still open
    check(t - first_taken == 1, "slot 0 row lost when slot 1 was opened");
    exp_tag.push_back(idx_t'(8)); exp_data.push_back(init_word(gaddr(SLOT1 + 7, 4)));
    access(0, SLOT1 + 7, 4, '0, 8, last_taken);
    check(last_taken - t == 1, "slot 1 row lost when slot 0 was read");
    wait (ret_cyc.size() == 15);
    repeat (4) @(posedge clk);
    check(idle, "sequencer idle at the end");
    check(exp_tag.size() == 0, "all reads returned");
    check(violations == 0, $sformatf("%0d SDRAM protocol violations", violations));
    check(hits == 11 && misses == 4, $sformatf("row hits %0d misses %0d, want 11 and 4", hits, misses));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
