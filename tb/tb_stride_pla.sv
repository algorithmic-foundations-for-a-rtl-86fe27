// tb_stride_pla: checks the stride table against a serial expansion.
//
// For every stride value of a 128-bank (m = 7) and a 16-bank (m = 4) table,
// the reference walks the vector element by element (bank += stride mod 2**m)
// to find the first element landing 2**s banks from the base, and the period
// after which the base bank is hit again (NextHit). Also checks the worked
// example of a 16-bank memory with stride 10 (s = 1, K1 = 5, delta = 8).
module tb_stride_pla;
  int checks = 0, failures = 0;

  logic [6:0] st7;  logic [2:0] s7;  logic [6:0] k7;  logic [7:0] d7;
  logic [3:0] st4;  logic [2:0] s4;  logic [3:0] k4;  logic [4:0] d4;

  stride_pla #(.LOG_BANKS(7)) dut7 (.stride_lo(st7), .s(s7), .k1(k7), .delta(d7));
  stride_pla #(.LOG_BANKS(4)) dut4 (.stride_lo(st4), .s(s4), .k1(k4), .delta(d4));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // serial expansion reference
  task automatic ref_of(int m, int v, output int s, output int k1, output int delta);
    int nb, bank, target;
    nb = 1 << m;
    s = 0;
    while (s < m && ((v >> s) & 1) == 0) s++;
    target = (s < m) ? (1 << s) : -1;
    k1 = 0;
    bank = 0;
    for (int k = 1; k <= nb; k++) begin
      bank = (bank + v) % nb;
      if (bank == target && k1 == 0) k1 = k;
    end
    delta = 0;
    bank = 0;
    for (int k = 1; k <= nb && delta == 0; k++) begin
      bank = (bank + v) % nb;
      if (bank == 0) delta = k;
    end
  endtask

  initial begin
    int s, k1, delta;
    for (int v = 0; v < 128; v++) begin
      st7 = 7'(v);
      #1;
      ref_of(7, v, s, k1, delta);
      check(int'(s7) == s && int'(k7) == k1 && int'(d7) == delta,
            $sformatf("m=7 S=%0d got s=%0d k1=%0d d=%0d want %0d %0d %0d", v, s7, k7, d7, s, k1, delta));
    end
    for (int v = 0; v < 16; v++) begin
      st4 = 4'(v);
      #1;
      ref_of(4, v, s, k1, delta);
      check(int'(s4) == s && int'(k4) == k1 && int'(d4) == delta,
            $sformatf("m=4 S=%0d got s=%0d k1=%0d d=%0d want %0d %0d %0d", v, s4, k4, d4, s, k1, delta));
    end
    st4 = 4'd10;
    #1;
    check(s4 == 3'd1 && k4 == 4'd5 && d4 == 5'd8, "16 banks, stride 10 example");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
