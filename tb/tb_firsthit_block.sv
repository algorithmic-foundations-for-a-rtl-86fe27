// tb_firsthit_block: checks the one-unit-plus-adders FirstHit of a whole
// physical bank against a serial walk of the vector.
//
// Three sizes: bank 3 of 8 with 16-word blocks (m = 7), bank 1 of 2 with
// 8-word blocks (m = 4), and bank 5 of 16 with 1-word blocks (m = 4, a single
// lane). For random base banks, strides (a quarter of them powers of two) and
// lengths, each lane's hit flag and first index must equal the first element
// that the walk finds in that lane's logical bank.
module tb_firsthit_block;
  import pva_pkg::*;
  int checks = 0, failures = 0;

  len_t len;
  logic [6:0] b0_a, st_a, k1_a, fi_a [16];  logic [2:0] s_a;  logic [7:0] dl_a;  logic [15:0] hit_a;
  logic [3:0] b0_b, st_b, k1_b, fi_b [8];   logic [2:0] s_b;  logic [4:0] dl_b;  logic [7:0]  hit_b;
  logic [3:0] b0_c, st_c, k1_c, fi_c [1];   logic [2:0] s_c;  logic [4:0] dl_c;  logic [0:0]  hit_c;

  stride_pla     #(.LOG_BANKS(7)) pla_a (.stride_lo(st_a), .s(s_a), .k1(k1_a), .delta(dl_a));
  firsthit_block #(.LOG_BANKS(7), .N_WORDS(16), .BANK(3)) dut_a (
    .b0(b0_a), .s(s_a), .k1(k1_a), .len, .hit(hit_a), .first_idx(fi_a));
  stride_pla     #(.LOG_BANKS(4)) pla_b (.stride_lo(st_b), .s(s_b), .k1(k1_b), .delta(dl_b));
  firsthit_block #(.LOG_BANKS(4), .N_WORDS(8), .BANK(1)) dut_b (
    .b0(b0_b), .s(s_b), .k1(k1_b), .len, .hit(hit_b), .first_idx(fi_b));
  stride_pla     #(.LOG_BANKS(4)) pla_c (.stride_lo(st_c), .s(s_c), .k1(k1_c), .delta(dl_c));
  firsthit_block #(.LOG_BANKS(4), .N_WORDS(1), .BANK(5)) dut_c (
    .b0(b0_c), .s(s_c), .k1(k1_c), .len, .hit(hit_c), .first_idx(fi_c));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  function automatic int walk(int m, int b0, int stride, int l, int bank);
    int nb = 1 << m;
    for (int k = 0; k < l; k++)
      if ((b0 + k * stride) % nb == bank) return k;
    return -1;
  endfunction

  task automatic compare(string tag, int m, int n, int p, int b0, int st, bit h, int fi, int j);
    int want = walk(m, b0, st, int'(len), p * n + j);
    check(h == (want >= 0) && (want < 0 || fi == want),
          $sformatf("%s b0=%0d S=%0d L=%0d lane %0d: hit=%0d idx=%0d, want %0d",
                    tag, b0, st, len, j, h, fi, want));
  endtask

  int n_hits = 0;
  initial begin
    for (int t = 0; t < 1500; t++) begin
      int sh;
      sh   = $urandom % 7;
      len  = len_t'(1 + $urandom % LMAX);
      b0_a = 7'($urandom);
      st_a = (t % 4 == 0) ? 7'(1 << sh) : 7'($urandom);
      b0_b = 4'($urandom);
      st_b = (t % 4 == 0) ? 4'(1 << (sh % 4)) : 4'($urandom);
      b0_c = 4'($urandom);
      st_c = 4'($urandom);
      #1;
      for (int j = 0; j < 16; j++) compare("8x16", 7, 16, 3, int'(b0_a), int'(st_a), hit_a[j], int'(fi_a[j]), j);
      for (int j = 0; j < 8; j++)  compare("2x8", 4, 8, 1, int'(b0_b), int'(st_b), hit_b[j], int'(fi_b[j]), j);
      compare("16x1", 4, 1, 5, int'(b0_c), int'(st_c), hit_c[0], int'(fi_c[0]), 0);
      n_hits += $countones(hit_a) + $countones(hit_b);
    end
    check(n_hits > 1000, $sformatf("only %0d lane hits seen", n_hits));
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
