// tb_pva_top: end-to-end test of the PVA subsystem at its default size
// (8 SDRAM banks, 16-word interleave, 2**20-word superpages), with one SDRAM
// bank model per bank. Runs cache-line fills, strided gathers and scatters,
// and checks every returned line against a shadow copy of memory. Checks the
// paper's rates: a line fill on an open row reads one word per cycle, and the
// first SDRAM command leaves no more than 5 cycles after the vector command
// is broadcast. Counts how often each mechanism happens and fails if one never
// does: gather, scatter, page split, row hit, row miss (precharge), a bank
// controller with no element of a vector, a logical bank holding several
// elements (NextHit stepping), and several banks accessed in the same cycle.
module tb_pva_top;
  import pva_pkg::*;
  localparam int M = 8, N = 16;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic    req_valid = 1'b0, req_ready, req_write = 1'b0, resp_valid, resp_write, ev_split;
  addr_t   req_base = '0, req_stride = '0;
  len_t    req_len = '0;
  data_t   req_wdata [LMAX], resp_rdata [LMAX];
  sd_cmd_e sd_cmd [M];
  logic    sd_cs [M];
  row_t    sd_row [M];
  col_t    sd_col [M];
  data_t   sd_wdata [M], sd_rdata [M];
  logic    ev_access [M], ev_row_hit [M], ev_row_miss [M];
  int      violations [M], n_act [M], n_pre [M];

  pva_top dut (
    .clk, .rst_n, .req_valid, .req_ready, .req_write, .req_base, .req_stride, .req_len,
    .req_wdata, .resp_valid, .resp_write, .resp_rdata, .sd_cmd, .sd_cs, .sd_row, .sd_col, .sd_wdata,
    .sd_rdata, .ev_split, .ev_access, .ev_row_hit, .ev_row_miss);

  for (genvar p = 0; p < M; p++) begin : g_mem
    sdram_bank_model #(.M_PHYS(M), .N_WORDS(N), .BANK(p)) mem (
      .clk, .sd_cmd(sd_cmd[p]), .sd_cs(sd_cs[p]), .sd_row(sd_row[p]), .sd_col(sd_col[p]),
      .sd_wdata(sd_wdata[p]), .sd_rdata(sd_rdata[p]), .violations(violations[p]),
      .n_act(n_act[p]), .n_pre(n_pre[p]));
  end

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

  // mechanism counters
  int c_gather = 0, c_scatter = 0, c_split = 0, c_hit = 0, c_miss = 0;
  int c_idle_bc = 0, c_nexthit = 0, c_parallel = 0;
  int cyc = 0;
  int acc_per_bank [M];
  int read_cyc [M][$];
  int first_cmd = -1, bcast = -1;
  always @(posedge clk) begin
    int active;
    cyc <= cyc + 1;
    active = 0;
    if (ev_split) c_split++;
    for (int p = 0; p < M; p++) begin
      if (ev_row_hit[p]) c_hit++;
      if (ev_row_miss[p]) c_miss++;
      if (ev_access[p]) begin
        acc_per_bank[p]++;
        active++;
      end
      if (sd_cmd[p] == SD_READ) read_cyc[p].push_back(cyc);
      if (sd_cmd[p] != SD_NOP && first_cmd < 0 && bcast >= 0) first_cmd = cyc;
    end
    if (dut.bc_cmd_valid && bcast < 0) bcast = cyc;
    if (active > 1) c_parallel++;
  end

  // one request, checked; returns its latency in cycles
  task automatic request(bit wr, addr_t b, addr_t s, int l, output int lat);
    int t0, want_acc [M], total;
    int nlb [addr_t];
    for (int i = 0; i < LMAX; i++) req_wdata[i] = $urandom;
    for (int p = 0; p < M; p++) begin
      acc_per_bank[p] = 0;
      want_acc[p] = 0;
      read_cyc[p].delete();
    end
    first_cmd = -1;
    bcast = -1;
    for (int k = 0; k < l; k++) begin
      addr_t a;
      a = b + s * addr_t'(k);
      want_acc[(a >> 4) % M]++;
      if (nlb.exists(a % (M * N))) nlb[a % (M * N)]++;
      else nlb[a % (M * N)] = 1;
    end
    req_valid  <= 1'b1;
    req_write  <= wr;
    req_base   <= b;
    req_stride <= s;
    req_len    <= len_t'(l);
    @(posedge clk);
    while (!req_ready) @(posedge clk);
    t0 = cyc;
    req_valid <= 1'b0;
    do @(posedge clk); while (!resp_valid && cyc - t0 < 2000);
    lat = cyc - t0;
    check(resp_valid && resp_write == wr, "no response");
    total = 0;
    for (int p = 0; p < M; p++) begin
      check(acc_per_bank[p] == want_acc[p],
            $sformatf("bank %0d made %0d accesses, want %0d", p, acc_per_bank[p], want_acc[p]));
      if (want_acc[p] == 0) c_idle_bc++;
      total += want_acc[p];
    end
    foreach (nlb[i]) if (nlb[i] > 1) begin
      c_nexthit++;
      break;
    end
    if (l > 0) check(first_cmd >= 0 && first_cmd - bcast <= 5,
                     $sformatf("first SDRAM command %0d cycles after broadcast", first_cmd - bcast));
    if (wr) begin
      c_scatter++;
      for (int k = 0; k < l; k++) shadow[b + s * addr_t'(k)] = req_wdata[k];
    end else begin
      c_gather++;
      for (int k = 0; k < LMAX; k++)
        check(resp_rdata[k] == ((k < l) ? mem_word(b + s * addr_t'(k)) : '0),
              $sformatf("B=%h S=%0d L=%0d word %0d: %h, want %h", b, s, l, k, resp_rdata[k],
                        (k < l) ? mem_word(b + s * addr_t'(k)) : '0));
    end
  endtask

  initial begin
    int lat, lat_closed, lat_open;
    for (int p = 0; p < M; p++) acc_per_bank[p] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    // cache-line fill, row closed then open
    request(0, 32'h0000_4050, 1, 16, lat_closed);
    request(0, 32'h0000_4050, 1, 16, lat_open);
    check(read_cyc[5].size() == 16 && read_cyc[5][15] - read_cyc[5][0] == 15,
          "line fill does not read one word per cycle");
    check(lat_closed - lat_open == 2, $sformatf("open-row fill %0d cycles, closed-row %0d",
                                                lat_open, lat_closed));
    $display("line fill latency: %0d cycles (row closed), %0d (row open)", lat_closed, lat_open);
    // the same line through a different row of bank 5: row miss
    request(0, 32'h0010_4050, 1, 16, lat);
    // strided vectors spread over the banks
    request(0, 32'h0000_0000, 16, 16, lat);
    $display("stride-16 gather (two elements per bank) latency: %0d cycles", lat);
    request(0, 32'h0000_0007, 9, 16, lat);
    request(0, 32'h0000_0003, 128, 16, lat);   // one bank only, one logical bank, delta = 1
    request(0, 32'h0000_0003, 64, 16, lat);    // NextHit step 2
    request(0, 32'h000F_FFF0, 1000, 16, lat);  // crosses a superpage
    request(1, 32'h0000_2000, 17, 16, lat);
    request(0, 32'h0000_2000, 17, 16, lat);
    for (int t = 0; t < 400; t++) begin
      addr_t b, s;
      b = addr_t'($urandom % (1 << 21));
      if (t % 10 == 0) b = 32'h000F_FFC0 + addr_t'($urandom % 64);
      case ($urandom % 4)
        0: s = addr_t'(1 + $urandom % 16);
        1: s = addr_t'(1 << ($urandom % 10));
        2: s = addr_t'($urandom % 300);
        default: s = addr_t'($urandom % 5000);
      endcase
      request(($urandom % 3) == 0, b, s, 1 + $urandom % LMAX, lat);
    end
    for (int p = 0; p < M; p++)
      check(violations[p] == 0, $sformatf("bank %0d: %0d SDRAM protocol violations", p, violations[p]));
    $display("events: gathers %0d scatters %0d page splits %0d row hits %0d row misses %0d",
             c_gather, c_scatter, c_split, c_hit, c_miss);
    $display("events: idle bank controllers %0d NextHit repeats %0d parallel-bank cycles %0d",
             c_idle_bc, c_nexthit, c_parallel);
    check(c_gather > 0, "no gather");
    check(c_scatter > 0, "no scatter");
    check(c_split > 0, "no page split");
    check(c_hit > 0, "no row hit");
    check(c_miss > 0, "no row miss");
    check(c_idle_bc > 0, "no idle bank controller");
    check(c_nexthit > 0, "no NextHit repeat");
    check(c_parallel > 0, "no parallel bank access");
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
