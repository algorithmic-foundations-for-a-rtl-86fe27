// tb_vector_command_unit: the VCU and the vector bus with four stand-in bank
// controllers (behavioural: bank = (address >> 2) mod 4, each returns its words
// one per cycle after a random delay, in any order). A 64-word superpage
// forces vectors to be split. Checks the gathered line, the words a scatter
// hands out, the number and the offsets of the pieces issued (computed here
// with the rounded-up-stride rule), and that a zero-length request is answered.
module tb_vector_command_unit;
  import pva_pkg::*;
  localparam int NBC = 4, PB = 6;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic     req_valid = 1'b0, req_ready, req_write = 1'b0, resp_valid, resp_write;
  addr_t    req_base = '0, req_stride = '0;
  len_t     req_len = '0;
  data_t    req_wdata [LMAX], resp_rdata [LMAX], wline [LMAX];
  logic     issue_valid, issue_ready, op_done, bc_cmd_valid, ev_split;
  vec_cmd_t issue_cmd, bc_cmd;
  logic [NBC-1:0] bc_busy;
  logic     ret_valid [NBC];
  idx_t     ret_idx [NBC];
  data_t    ret_data [NBC];

  vector_command_unit #(.N_BC(NBC), .PAGE_BITS(PB)) dut (
    .clk, .rst_n, .req_valid, .req_ready, .req_write, .req_base, .req_stride, .req_len,
    .req_wdata, .resp_valid, .resp_write, .resp_rdata, .bus_issue_valid(issue_valid),
    .bus_issue_ready(issue_ready), .bus_issue_cmd(issue_cmd), .bus_op_done(op_done),
    .wline, .ret_valid, .ret_idx, .ret_data, .ev_split);

  vector_bus #(.N_BC(NBC)) bus (.clk, .rst_n, .issue_valid, .issue_ready, .issue_cmd, .op_done,
                                .bc_cmd_valid, .bc_cmd, .bc_busy);

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

  // stand-in bank controllers
  int    q_idx [NBC][$];
  data_t q_dat [NBC][$];
  int    wait_c [NBC];
  vec_cmd_t pieces [$];
  always @(posedge clk) begin
    for (int b = 0; b < NBC; b++) begin
      ret_valid[b] <= 1'b0;
      if (wait_c[b] > 0) wait_c[b] <= wait_c[b] - 1;
      else if (q_idx[b].size() > 0) begin
        ret_valid[b] <= 1'b1;
        ret_idx[b]   <= idx_t'(q_idx[b].pop_front());
        ret_data[b]  <= q_dat[b].pop_front();
      end
    end
    if (rst_n && bc_cmd_valid) begin
      pieces.push_back(bc_cmd);
      for (int b = 0; b < NBC; b++) wait_c[b] <= $urandom % 6;
      for (int k = 0; k < int'(bc_cmd.len); k++) begin
        addr_t a;
        int    b;
        a = bc_cmd.base + bc_cmd.stride * addr_t'(k);
        b = int'((a >> 2) % NBC);
        if (bc_cmd.write) shadow[a] = wline[int'(bc_cmd.offset) + k];
        else begin
          q_idx[b].push_back(int'(bc_cmd.offset) + k);
          q_dat[b].push_back(mem_word(a));
        end
      end
    end
  end
  always_comb for (int b = 0; b < NBC; b++)
    bc_busy[b] = (q_idx[b].size() > 0) || (wait_c[b] > 0) || ret_valid[b];

  // pieces expected from the rounded-stride rule
  function automatic int n_pieces(addr_t b, addr_t s, int l);
    int n = 0;
    longint pow2 = 1, bound;
    while (pow2 < longint'(s)) pow2 = pow2 * 2;
    while (l > 0) begin
      bound = (s == 0) ? l : ((((longint'(b) >> PB) + 1) << PB) - 1 - longint'(b)) / pow2 + 1;
      if (bound > l) bound = l;
      b = b + s * addr_t'(bound);
      l = l - int'(bound);
      n++;
    end
    return n;
  endfunction

  int splits = 0;
  always @(posedge clk) if (ev_split) splits++;

  task automatic request(bit wr, addr_t b, addr_t s, int l);
    data_t line [LMAX];
    int t;
    pieces.delete();
    for (int i = 0; i < LMAX; i++) req_wdata[i] = $urandom;
    req_valid  <= 1'b1;
    req_write  <= wr;
    req_base   <= b;
    req_stride <= s;
    req_len    <= len_t'(l);
    @(posedge clk);
    while (!req_ready) @(posedge clk);
    req_valid <= 1'b0;
    t = 0;
    do begin
      @(posedge clk);
      t++;
    end while (!resp_valid && t < 500);
    check(resp_valid && resp_write == wr, "no response");
    // expected
    for (int i = 0; i < LMAX; i++) line[i] = '0;
    for (int k = 0; k < l; k++) begin
      addr_t a = b + s * addr_t'(k);
      if (wr) check(shadow.exists(a) && (s == 0 || shadow[a] == req_wdata[k]),
                    $sformatf("scatter word %0d not delivered", k));
      else line[k] = mem_word(a);
    end
    if (!wr)
      for (int i = 0; i < LMAX; i++)
        check(resp_rdata[i] == line[i], $sformatf("B=%h S=%0d L=%0d word %0d: %h want %h",
                                                  b, s, l, i, resp_rdata[i], line[i]));
    check(pieces.size() == n_pieces(b, s, l),
          $sformatf("B=%h S=%0d L=%0d: %0d pieces, want %0d", b, s, l, pieces.size(), n_pieces(b, s, l)));
    begin
      int off = 0;
      foreach (pieces[i]) begin
        check(int'(pieces[i].offset) == off && pieces[i].base == b + s * addr_t'(off),
              "piece offset or base");
        off += int'(pieces[i].len);
      end
      check(off == l, "pieces do not cover the vector");
    end
  endtask

  initial begin
    for (int b = 0; b < NBC; b++) begin
      wait_c[b] = 0;
      ret_valid[b] = 1'b0;
      ret_idx[b] = '0;
      ret_data[b] = '0;
    end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    request(0, 32'h100, 1, 16);
    request(0, 32'h13C, 3, 16);          // crosses the 64-word page
    request(1, 32'h13C, 3, 16);
    request(0, 32'h13C, 3, 16);
    request(0, 32'h200, 5, 0);
    for (int t = 0; t < 300; t++)
      request(($urandom % 3) == 0, addr_t'($urandom % 4096), addr_t'(1 + $urandom % 70),
              1 + $urandom % LMAX);
    check(splits > 50, $sformatf("only %0d page splits", splits));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
