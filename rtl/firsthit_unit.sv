// firsthit_unit: FirstHit(V, b) for one word-wide logical bank.
//
// With word interleaving (one word per logical bank) the bank of the base
// address is b0 = B mod 2**m, and the distance of this bank from it is
// d = (b - b0) mod 2**m. The vector touches this bank only if d is a multiple
// of 2**s; the first element that does is K_i = (K1 * (d >> s)) mod 2**(m-s),
// and it counts as a hit only if K_i < L. All of this follows the paper's
// derivation (Lemma 5.2, Theorem 5.3 and the step list for a bank
// controller); the multiply keeps only the low m bits of K1 * i and then
// masks to m-s bits.
//
// Interface: purely combinational. s, k1 come from stride_pla.
module firsthit_unit
  import pva_pkg::*;
#(
  parameter int LOG_BANKS = 7
) (
  input  logic [LOG_BANKS-1:0]           bank,      // this logical bank, b
  input  logic [LOG_BANKS-1:0]           b0,        // DecodeBank(V.B)
  input  logic [$clog2(LOG_BANKS+1)-1:0] s,
  input  logic [LOG_BANKS-1:0]           k1,
  input  len_t                           len,       // V.L
  output logic                           hit,
  output logic [LOG_BANKS-1:0]           first_idx  // FirstHit(V, b) when hit
);
  logic [LOG_BANKS-1:0] d, i_mult, low_mask, ki, prod;

  always_comb begin
    d        = bank - b0;                               // wraps mod 2**m
    low_mask = LOG_BANKS'((1 << s) - 1);                // 2**s - 1
    i_mult   = d >> s;                                  // i = d / 2**s
    prod     = k1 * i_mult;                             // low m bits only
    ki       = prod & LOG_BANKS'((1 << (LOG_BANKS - int'(s))) - 1);
    first_idx = ki;
    hit      = ((d & low_mask) == '0) && ((LOG_BANKS+LEN_W)'(ki) < (LOG_BANKS+LEN_W)'(len));
  end
endmodule
