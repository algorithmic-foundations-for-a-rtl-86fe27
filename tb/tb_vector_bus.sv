// tb_vector_bus: four stand-in bank controllers that stay busy for a random
// number of cycles after each broadcast. Checks that every command reaches
// them unchanged for exactly one cycle, that no new command is taken while one
// is in flight, and that op_done fires once, in the first cycle after the
// broadcast in which no controller is busy.
module tb_vector_bus;
  import pva_pkg::*;
  localparam int NBC = 4;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic     issue_valid = 1'b0, issue_ready, op_done, bc_cmd_valid;
  vec_cmd_t issue_cmd = '0, bc_cmd;
  logic [NBC-1:0] bc_busy;
  int       remain [NBC];

  vector_bus #(.N_BC(NBC)) dut (.clk, .rst_n, .issue_valid, .issue_ready, .issue_cmd,
                                .op_done, .bc_cmd_valid, .bc_cmd, .bc_busy);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  int delays [NBC];
  always_comb for (int i = 0; i < NBC; i++) bc_busy[i] = remain[i] > 0;
  always @(posedge clk) begin
    for (int i = 0; i < NBC; i++) begin
      if (!rst_n) remain[i] <= 0;
      else if (bc_cmd_valid) remain[i] <= delays[i];
      else if (remain[i] > 0) remain[i] <= remain[i] - 1;
    end
  end

  initial begin
    int t_issue, n_valid, n_done, t_done, longest;
    vec_cmd_t c;
    for (int i = 0; i < NBC; i++) remain[i] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int t = 0; t < 200; t++) begin
      longest = 0;
      for (int i = 0; i < NBC; i++) begin
        delays[i] = $urandom % 12;
        if (delays[i] > longest) longest = delays[i];
      end
      c = '{write: 1'($urandom), base: $urandom, stride: $urandom, len: len_t'($urandom % 17),
            offset: idx_t'($urandom)};
      issue_cmd   <= c;
      issue_valid <= 1'b1;
      @(posedge clk);
      check(issue_ready, "bus not ready when idle");
      issue_valid <= 1'b0;
      issue_cmd   <= '0;
      n_valid = 0;
      n_done  = 0;
      t_done  = 0;
      for (int k = 1; k <= 20; k++) begin
        #1;
        if (bc_cmd_valid) begin
          n_valid++;
          check(bc_cmd == c, "broadcast command differs from the issued one");
        end
        if (op_done) begin
          n_done++;
          t_done = k;
        end
        if (n_done == 0) check(!issue_ready, "bus ready while a command is in flight");
        @(posedge clk);
      end
      check(n_valid == 1, $sformatf("command broadcast for %0d cycles", n_valid));
      check(n_done == 1, $sformatf("op_done fired %0d times", n_done));
      check(t_done == longest + 2, $sformatf("op_done after %0d cycles, want %0d", t_done, longest + 2));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
