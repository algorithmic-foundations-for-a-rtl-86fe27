// tb_firsthit_unit: checks FirstHit against a serial walk of the vector.
//
// Random base banks, strides, lengths and logical banks for a 128-bank memory
// (m = 7), plus the 16-bank, stride-10 example whose elements fall in banks
// 2, 12, 6, 0, 10, 4, 14, 8 in order. The reference walks elements 0..L-1 and
// reports the first whose bank is the one asked about.
module tb_firsthit_unit;
  import pva_pkg::*;
  int checks = 0, failures = 0;

  logic [6:0] st7, b0_7, bank7;  logic [2:0] s7;  logic [6:0] k7, fi7;  logic [7:0] d7;
  logic [3:0] st4, b0_4, bank4;  logic [2:0] s4;  logic [3:0] k4, fi4;  logic [4:0] d4;
  len_t len7, len4;
  logic hit7, hit4;

  stride_pla    #(.LOG_BANKS(7)) pla7 (.stride_lo(st7), .s(s7), .k1(k7), .delta(d7));
  firsthit_unit #(.LOG_BANKS(7)) dut7 (.bank(bank7), .b0(b0_7), .s(s7), .k1(k7), .len(len7),
                                       .hit(hit7), .first_idx(fi7));
  stride_pla    #(.LOG_BANKS(4)) pla4 (.stride_lo(st4), .s(s4), .k1(k4), .delta(d4));
  firsthit_unit #(.LOG_BANKS(4)) dut4 (.bank(bank4), .b0(b0_4), .s(s4), .k1(k4), .len(len4),
                                       .hit(hit4), .first_idx(fi4));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic int walk(int m, int b0, int stride, int len, int bank);
    int nb = 1 << m;
    for (int k = 0; k < len; k++)
      if ((b0 + k * stride) % nb == bank) return k;
    return -1;
  endfunction

  initial begin
    int want;
    int order [8] = '{2, 12, 6, 0, 10, 4, 14, 8};
    for (int t = 0; t < 4000; t++) begin
      b0_7  = 7'($urandom);
      st7   = (t % 4 == 0) ? 7'(1 << ($urandom % 7)) : 7'($urandom);
      bank7 = 7'($urandom);
      len7  = len_t'(1 + $urandom % LMAX);
      #1;
      want = walk(7, int'(b0_7), int'(st7), int'(len7), int'(bank7));
      check(hit7 == (want >= 0) && (want < 0 || int'(fi7) == want),
            $sformatf("b0=%0d S=%0d L=%0d b=%0d got hit=%0d idx=%0d want %0d",
                      b0_7, st7, len7, bank7, hit7, fi7, want));
    end
    // stride 10 on 16 banks starting at bank 2
    st4 = 4'd10;
    b0_4 = 4'd2;
    len4 = len_t'(16);
    for (int b = 0; b < 16; b++) begin
      bank4 = 4'(b);
      #1;
      want = -1;
      foreach (order[i]) if (order[i] == b) want = i;
      check(hit4 == (want >= 0) && (want < 0 || int'(fi4) == want),
            $sformatf("stride 10 example bank %0d got hit=%0d idx=%0d want %0d", b, hit4, fi4, want));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
