// tb_bank_controller: one bank controller (bank 3 of 8, 16-word interleave)
// with an SDRAM bank model, checked against a serial expansion of each vector.
//
// For each random gather the reference lists, in ascending index order, the
// elements whose address decodes to bank 3; the controller must return exactly
// those, in that order, with the right data. Scatters write the line's words
// and are read back by later gathers through a shadow copy of memory. Also
// checked: the first SDRAM command leaves at most 5 cycles after the command
// (at most five memory cycles to generate subcommands), no SDRAM protocol
// violation, and a 16-word line fill on an open row streams one word per cycle.
module tb_bank_controller;
  import pva_pkg::*;
  localparam int M = 8, N = 16, BANK = 3;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic     cmd_valid = 1'b0;
  vec_cmd_t cmd = '0;
  data_t    wline [LMAX];
  logic     busy, ret_valid, ev_access, ev_row_hit, ev_row_miss;
  idx_t     ret_idx;
  data_t    ret_data, sd_wdata, sd_rdata;
  sd_cmd_e  sd_cmd;
  logic     sd_cs;
  row_t     sd_row;
  col_t     sd_col;
  int       violations, n_act, n_pre;

  bank_controller #(.M_PHYS(M), .N_WORDS(N), .BANK(BANK)) dut (
    .clk, .rst_n, .cmd_valid, .cmd, .wline, .busy, .ret_valid, .ret_idx, .ret_data,
    .ev_access, .ev_row_hit, .ev_row_miss, .sd_cmd, .sd_cs, .sd_row, .sd_col, .sd_wdata, .sd_rdata);

  sdram_bank_model #(.M_PHYS(M), .N_WORDS(N), .BANK(BANK)) mem (
    .clk, .sd_cmd, .sd_cs, .sd_row, .sd_col, .sd_wdata, .sd_rdata, .violations, .n_act, .n_pre);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  function automatic data_t init_word(addr_t a);
    return (a * 32'h9E37_79B1) ^ 32'h0F0F_1234;
  endfunction

  data_t shadow [addr_t];
  function automatic data_t mem_word(addr_t a);
    return shadow.exists(a) ? shadow[a] : init_word(a);
  endfunction

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int got_idx [$];
  data_t got_data [$];
  int first_cmd_cyc, read_cycles [$];
  always @(posedge clk) begin
    if (rst_n && ret_valid) begin
      got_idx.push_back(int'(ret_idx));
      got_data.push_back(ret_data);
    end
    if (rst_n && sd_cmd != SD_NOP && first_cmd_cyc < 0) first_cmd_cyc = cyc;
    if (rst_n && sd_cmd == SD_READ) read_cycles.push_back(cyc);
  end

  // run one vector; returns the number of elements in this bank
  task automatic run(bit wr, addr_t b, addr_t s, int l, output int n_mine);
    int exp_idx [$];
    addr_t exp_addr [$];
    int t0;
    for (int k = 0; k < l; k++) begin
      addr_t a = b + s * addr_t'(k);
      if (((a >> 4) & 7) == BANK) begin
        exp_idx.push_back(k);
        exp_addr.push_back(a);
      end
    end
    n_mine = exp_idx.size();
    for (int i = 0; i < LMAX; i++) wline[i] = $urandom;
    got_idx.delete();
    got_data.delete();
    read_cycles.delete();
    first_cmd_cyc = -1;
    cmd       <= '{write: wr, base: b, stride: s, len: len_t'(l), offset: '0};
    cmd_valid <= 1'b1;
    @(posedge clk);
    t0 = cyc;
    cmd_valid <= 1'b0;
    @(posedge clk);
    while (busy) @(posedge clk);
    if (wr) begin
      foreach (exp_idx[i]) shadow[exp_addr[i]] = wline[exp_idx[i]];
      check(got_idx.size() == 0, "a scatter returned data");
    end else begin
      check(got_idx.size() == exp_idx.size(),
            $sformatf("B=%0d S=%0d L=%0d: %0d words back, want %0d", b, s, l, got_idx.size(), exp_idx.size()));
      foreach (exp_idx[i]) if (i < got_idx.size())
        check(got_idx[i] == exp_idx[i] && got_data[i] == mem_word(exp_addr[i]),
              $sformatf("B=%0d S=%0d L=%0d elem %0d: idx %0d data %h, want %0d %h", b, s, l, i,
                        got_idx[i], got_data[i], exp_idx[i], mem_word(exp_addr[i])));
    end
    if (n_mine > 0)
      check(first_cmd_cyc >= 0 && first_cmd_cyc - t0 <= 4,
            $sformatf("first SDRAM command %0d cycles after the command", first_cmd_cyc - t0 + 1));
  endtask

  initial begin
    static int n, hits_total = 0, fill_span;
    static addr_t strides [10] = '{1, 2, 3, 4, 8, 9, 16, 17, 128, 0};
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int t = 0; t < 400; t++) begin
      addr_t b, s;
      b = addr_t'($urandom % (1 << 20));
      s = (t % 3 == 0) ? addr_t'($urandom % (1 << 12)) : strides[$urandom % 10];
      run(($urandom % 3) == 0, b, s, 1 + $urandom % LMAX, n);
      hits_total += n;
    end
    check(hits_total > 200, "random vectors rarely touched this bank");
    // line fill: 16 words of one block of bank 3; run twice so the row is open
    run(0, 32'h0001_2030, 1, 16, n);
    run(0, 32'h0001_2030, 1, 16, n);
    check(n == 16, "line fill lies in this bank");
    check(read_cycles.size() == 16, "line fill reads");
    fill_span = read_cycles[$] - read_cycles[0];
    check(fill_span == 15, $sformatf("line fill took %0d cycles for 16 reads", fill_span + 1));
    check(violations == 0, $sformatf("%0d SDRAM protocol violations", violations));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
