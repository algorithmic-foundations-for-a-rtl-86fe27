// tb_fh_styles: the three FirstHit builds of the bank controller must behave
// identically, cycle for cycle.
//
// Two small memories are used, so that the (distance, stride) table stays
// small: bank 2 of 4 with 4-word blocks, and bank 1 of 2 with 8-word blocks
// (16 logical banks each). In each, controllers with FH_STYLE 0 (K1*i per
// lane), 1 (table per lane) and 2 (one unit and adders) get the same random
// gathers and scatters. Every cycle their SDRAM commands (with the row, column
// and write data they carry), returned words and busy flags must match those of
// style 0; each must also issue exactly as many accesses per vector as a serial
// walk finds in its bank. Style 0 drives an SDRAM bank model whose read data
// go to all three.
module tb_fh_styles;
  import pva_pkg::*;
  localparam int NS = 3;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic     cmd_valid = 1'b0;
  vec_cmd_t cmd = '0;
  data_t    wline [LMAX];

  typedef struct packed {
    logic    busy, ret_valid, ev_access;
    idx_t    ret_idx;
    data_t   ret_data;
    sd_cmd_e sd_cmd;
    row_t    sd_row;
    col_t    sd_col;
    data_t   sd_wdata;
  } obs_t;

  obs_t  oa [NS], ob [NS];
  data_t rd_a, rd_b;
  int    viol_a, viol_b, nact, npre;

  for (genvar g = 0; g < NS; g++) begin : g_style
    logic cs_a, cs_b, rh_a, rm_a, rh_b, rm_b;
    bank_controller #(.M_PHYS(4), .N_WORDS(4), .BANK(2), .FH_STYLE(g)) bc_a (
      .clk, .rst_n, .cmd_valid, .cmd, .wline, .busy(oa[g].busy),
      .ret_valid(oa[g].ret_valid), .ret_idx(oa[g].ret_idx), .ret_data(oa[g].ret_data),
      .ev_access(oa[g].ev_access), .ev_row_hit(rh_a), .ev_row_miss(rm_a),
      .sd_cmd(oa[g].sd_cmd), .sd_cs(cs_a), .sd_row(oa[g].sd_row), .sd_col(oa[g].sd_col),
      .sd_wdata(oa[g].sd_wdata), .sd_rdata(rd_a));
    bank_controller #(.M_PHYS(2), .N_WORDS(8), .BANK(1), .FH_STYLE(g)) bc_b (
      .clk, .rst_n, .cmd_valid, .cmd, .wline, .busy(ob[g].busy),
      .ret_valid(ob[g].ret_valid), .ret_idx(ob[g].ret_idx), .ret_data(ob[g].ret_data),
      .ev_access(ob[g].ev_access), .ev_row_hit(rh_b), .ev_row_miss(rm_b),
      .sd_cmd(ob[g].sd_cmd), .sd_cs(cs_b), .sd_row(ob[g].sd_row), .sd_col(ob[g].sd_col),
      .sd_wdata(ob[g].sd_wdata), .sd_rdata(rd_b));
  end

  sdram_bank_model #(.M_PHYS(4), .N_WORDS(4), .BANK(2)) mem_a (
    .clk, .sd_cmd(oa[0].sd_cmd), .sd_cs(g_style[0].cs_a), .sd_row(oa[0].sd_row),
    .sd_col(oa[0].sd_col), .sd_wdata(oa[0].sd_wdata), .sd_rdata(rd_a),
    .violations(viol_a), .n_act(nact), .n_pre(npre));
  sdram_bank_model #(.M_PHYS(2), .N_WORDS(8), .BANK(1)) mem_b (
    .clk, .sd_cmd(ob[0].sd_cmd), .sd_cs(g_style[0].cs_b), .sd_row(ob[0].sd_row),
    .sd_col(ob[0].sd_col), .sd_wdata(ob[0].sd_wdata), .sd_rdata(rd_b),
    .violations(viol_b), .n_act(), .n_pre());

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // Pins without a command, and return data without ret_valid, are don't-care.
  function automatic obs_t visible(obs_t o);
    if (o.sd_cmd != SD_READ && o.sd_cmd != SD_WRITE && o.sd_cmd != SD_ACT) begin
      o.sd_row = '0;
      o.sd_col = '0;
    end
    if (o.sd_cmd != SD_WRITE) o.sd_wdata = '0;
    if (!o.ret_valid) begin
      o.ret_idx  = '0;
      o.ret_data = '0;
    end
    return o;
  endfunction

  // cycle-by-cycle comparison with style 0
  int acc_a [NS], acc_b [NS];
  always @(posedge clk) begin
    if (rst_n) begin
      for (int g = 1; g < NS; g++) begin
        check(visible(oa[g]) == visible(oa[0]), $sformatf("4x4 style %0d differs from style 0 at %0t", g, $time));
        check(visible(ob[g]) == visible(ob[0]), $sformatf("2x8 style %0d differs from style 0 at %0t", g, $time));
      end
      for (int g = 0; g < NS; g++) begin
        acc_a[g] += int'(oa[g].ev_access);
        acc_b[g] += int'(ob[g].ev_access);
      end
    end
  end

  // elements of <b, s, l> in physical bank p of an m x n memory
  function automatic int count_in_bank(addr_t b, addr_t s, int l, int m, int n, int p);
    int c = 0;
    for (int k = 0; k < l; k++)
      if ((((b + s * addr_t'(k)) / addr_t'(n)) % addr_t'(m)) == addr_t'(p)) c++;
    return c;
  endfunction

  initial begin
    int l, want_a, want_b;
    addr_t b, s;
    bit wr;
    for (int i = 0; i < LMAX; i++) wline[i] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int t = 0; t < 300; t++) begin
      b  = $urandom % 8192;
      s  = (t % 5 == 0) ? addr_t'(1 << ($urandom % 6)) : addr_t'($urandom % 40);
      l  = 1 + $urandom % LMAX;
      wr = ($urandom % 3 == 0);
      want_a = count_in_bank(b, s, l, 4, 4, 2);
      want_b = count_in_bank(b, s, l, 2, 8, 1);
      for (int g = 0; g < NS; g++) begin
        acc_a[g] = 0;
        acc_b[g] = 0;
      end
      for (int i = 0; i < LMAX; i++) wline[i] <= $urandom;
      cmd       <= '{write: wr, base: b, stride: s, len: len_t'(l), offset: '0};
      cmd_valid <= 1'b1;
      @(posedge clk);
      cmd_valid <= 1'b0;
      @(posedge clk);
      while (oa[0].busy || ob[0].busy || oa[1].busy || ob[1].busy || oa[2].busy || ob[2].busy)
        @(posedge clk);
      @(posedge clk);
      for (int g = 0; g < NS; g++) begin
        check(acc_a[g] == want_a, $sformatf("4x4 style %0d B=%0d S=%0d L=%0d: %0d accesses, want %0d",
                                            g, b, s, l, acc_a[g], want_a));
        check(acc_b[g] == want_b, $sformatf("2x8 style %0d B=%0d S=%0d L=%0d: %0d accesses, want %0d",
                                            g, b, s, l, acc_b[g], want_b));
      end
    end
    check(viol_a == 0 && viol_b == 0, $sformatf("SDRAM protocol violations: %0d, %0d", viol_a, viol_b));
    check(nact > 0, "no row was ever opened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
