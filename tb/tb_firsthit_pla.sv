// tb_firsthit_pla: checks the (distance, stride) FirstHit table against a
// serial walk of the vector.
//
// Every combination of stride, base bank and logical bank of a 16-bank memory
// (m = 4) is tried with a random length, and again with the full length 16;
// an 8-bank table (m = 3) is swept the same way. The reference walks elements
// 0..L-1 and reports the first whose bank is the one asked about. The 16-bank
// stride-10 example (banks 2, 12, 6, 0, 10, 4, 14, 8 in element order) is
// checked explicitly.
module tb_firsthit_pla;
  import pva_pkg::*;
  int checks = 0, failures = 0;

  logic [3:0] bank4, b0_4, st4, fi4;
  logic [2:0] bank3, b0_3, st3, fi3;
  len_t       len4, len3;
  logic       hit4, hit3;

  firsthit_pla #(.LOG_BANKS(4)) dut4 (.bank(bank4), .b0(b0_4), .stride_lo(st4), .len(len4),
                                     .hit(hit4), .first_idx(fi4));
  firsthit_pla #(.LOG_BANKS(3)) dut3 (.bank(bank3), .b0(b0_3), .stride_lo(st3), .len(len3),
                                     .hit(hit3), .first_idx(fi3));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
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
    static int order [8] = '{2, 12, 6, 0, 10, 4, 14, 8};
    for (int pass = 0; pass < 2; pass++)
      for (int s = 0; s < 16; s++)
        for (int b0 = 0; b0 < 16; b0++)
          for (int b = 0; b < 16; b++) begin
            st4 = 4'(s);  b0_4 = 4'(b0);  bank4 = 4'(b);
            len4 = (pass == 0) ? len_t'(1 + $urandom % LMAX) : len_t'(LMAX);
            #1;
            want = walk(4, b0, s, int'(len4), b);
            check(hit4 == (want >= 0) && (want < 0 || int'(fi4) == want),
                  $sformatf("m=4 b0=%0d S=%0d L=%0d b=%0d: hit=%0d idx=%0d, want %0d",
                            b0, s, len4, b, hit4, fi4, want));
          end
    for (int s = 0; s < 8; s++)
      for (int b0 = 0; b0 < 8; b0++)
        for (int b = 0; b < 8; b++) begin
          st3 = 3'(s);  b0_3 = 3'(b0);  bank3 = 3'(b);
          len3 = len_t'(1 + $urandom % 9);
          #1;
          want = walk(3, b0, s, int'(len3), b);
          check(hit3 == (want >= 0) && (want < 0 || int'(fi3) == want),
                $sformatf("m=3 b0=%0d S=%0d L=%0d b=%0d: hit=%0d idx=%0d, want %0d",
                          b0, s, len3, b, hit3, fi3, want));
        end
    // stride 10 from bank 2 on 16 banks
    st4 = 4'd10;  b0_4 = 4'd2;  len4 = len_t'(16);
    for (int b = 0; b < 16; b++) begin
      bank4 = 4'(b);
      #1;
      want = -1;
      foreach (order[i]) if (order[i] == b) want = i;
      check(hit4 == (want >= 0) && (want < 0 || int'(fi4) == want),
            $sformatf("stride 10, bank %0d: hit=%0d idx=%0d, want %0d", b, hit4, fi4, want));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
