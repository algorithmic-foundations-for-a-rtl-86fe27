// tb_page_splitter: random vectors near superpage ends, for a 256-word page and
// for the default page. The reference counts, element by element, how many
// leading elements really stay in the base's page; the splitter's count must
// be at least 1 (for L > 0), never more than that, and equal to
// min(L, floor(distance to page end / stride rounded up to a power of two) + 1).
module tb_page_splitter;
  import pva_pkg::*;
  int checks = 0, failures = 0;

  addr_t base, stride;
  len_t  len;
  len_t  cnt_s, rest_s, cnt_d, rest_d;
  addr_t nb_s, nb_d;
  logic  split_s, split_d;

  page_splitter #(.PAGE_BITS(8)) dut_s (.base, .stride, .len, .count(cnt_s), .next_base(nb_s),
                                        .rest(rest_s), .split(split_s));
  page_splitter dut_d (.base, .stride, .len, .count(cnt_d), .next_base(nb_d),
                       .rest(rest_d), .split(split_d));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  task automatic verify(int pbits, len_t cnt, addr_t nb, len_t rest, logic split);
    longint page, exact, pow2, bound, want, b, s;
    b = longint'(base);
    s = longint'(stride);
    page = b >> pbits;
    exact = 0;
    while (exact < longint'(len) && ((b + s * exact) >> pbits) == page) exact++;
    pow2 = 1;
    while (pow2 < s) pow2 = pow2 * 2;
    bound = (s == 0) ? longint'(len) : ((((page + 1) << pbits) - 1 - b) / pow2) + 1;
    want = (bound < longint'(len)) ? bound : longint'(len);
    check(longint'(cnt) == want && longint'(cnt) <= exact && (len == 0 || cnt >= 1),
          $sformatf("page 2^%0d B=%h S=%0d L=%0d: count %0d, want %0d (exact %0d)",
                    pbits, base, stride, len, cnt, want, exact));
    check(rest == len - cnt && split == (rest != 0) && nb == base + stride * addr_t'(cnt),
          "next base / rest");
  endtask

  initial begin
    int splits = 0;
    for (int t = 0; t < 3000; t++) begin
      case (t % 3)
        0: stride = addr_t'($urandom % 40);
        1: stride = addr_t'(1 << ($urandom % 12));
        default: stride = addr_t'($urandom % 5000);
      endcase
      len = len_t'($urandom % (LMAX + 1));
      base = (t % 2 == 0) ? ({$urandom} | 32'h000F_FF00) - addr_t'($urandom % 64)
                          : addr_t'($urandom);
      #1;
      verify(8, cnt_s, nb_s, rest_s, split_s);
      verify(20, cnt_d, nb_d, rest_d, split_d);
      if (split_s) splits++;
    end
    check(splits > 100, "few splits exercised");
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
