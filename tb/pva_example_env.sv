// pva_example_env: a pva_top of a given size with one SDRAM bank model per
// bank, and a task that gathers one vector and reports, for every element,
// which bank controller returned it. Used by tb_pva_examples.
module pva_example_env
  import pva_pkg::*;
#(
  parameter int M = 8,
  parameter int N = 16,
  parameter int SLOTS = 1
) (
  input logic clk,
  input logic rst_n
);
  logic    req_valid = 1'b0, req_ready, req_write = 1'b0, resp_valid, resp_write, ev_split;
  addr_t   req_base = '0, req_stride = '0;
  len_t    req_len = '0;
  data_t   req_wdata [LMAX], resp_rdata [LMAX];
  sd_cmd_e sd_cmd [M];
  logic [SLOTS-1:0] sd_cs [M];
  row_t    sd_row [M];
  col_t    sd_col [M];
  data_t   sd_wdata [M], sd_rdata [M];
  logic    ev_access [M], ev_row_hit [M], ev_row_miss [M];
  int      violations [M], n_act [M], n_pre [M];

  initial for (int i = 0; i < LMAX; i++) req_wdata[i] = '0;

  pva_top #(.M_PHYS(M), .N_WORDS(N), .SLOTS(SLOTS)) dut (
    .clk, .rst_n, .req_valid, .req_ready, .req_write, .req_base, .req_stride, .req_len,
    .req_wdata, .resp_valid, .resp_write, .resp_rdata, .sd_cmd, .sd_cs, .sd_row, .sd_col, .sd_wdata,
    .sd_rdata, .ev_split, .ev_access, .ev_row_hit, .ev_row_miss);

  for (genvar p = 0; p < M; p++) begin : g_mem
    sdram_bank_model #(.M_PHYS(M), .N_WORDS(N), .BANK(p), .SLOTS(SLOTS)) mem (
      .clk, .sd_cmd(sd_cmd[p]), .sd_cs(sd_cs[p]), .sd_row(sd_row[p]), .sd_col(sd_col[p]),
      .sd_wdata(sd_wdata[p]), .sd_rdata(sd_rdata[p]), .violations(violations[p]),
      .n_act(n_act[p]), .n_pre(n_pre[p]));
  end

  int bank_of [LMAX];
  always @(posedge clk)
    for (int p = 0; p < M; p++)
      if (dut.ret_valid[p]) bank_of[dut.ret_idx[p]] = p;

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // gather <b, s, l>; banks[k] = bank that returned element k, data_ok = line
  // matches the memory's initial contents, lat = cycles from request to answer
  task automatic gather(addr_t b, addr_t s, int l, output int banks [LMAX],
                        output bit data_ok, output int lat);
    int t0;
    for (int k = 0; k < LMAX; k++) bank_of[k] = -1;
    req_valid  <= 1'b1;
    req_write  <= 1'b0;
    req_base   <= b;
    req_stride <= s;
    req_len    <= len_t'(l);
    @(posedge clk);
    while (!req_ready) @(posedge clk);
    t0 = cyc;
    req_valid <= 1'b0;
    do @(posedge clk); while (!resp_valid && cyc - t0 < 1000);
    lat = cyc - t0;
    data_ok = resp_valid;
    for (int k = 0; k < l; k++) begin
      addr_t a;
      a = b + s * addr_t'(k);
      if (resp_rdata[k] != ((a * 32'h9E37_79B1) ^ 32'h0F0F_1234)) data_ok = 1'b0;
    end
    banks = bank_of;
  endtask

  function automatic int total_violations();
    int v = 0;
    for (int p = 0; p < M; p++) v += violations[p];
    return v;
  endfunction
endmodule
