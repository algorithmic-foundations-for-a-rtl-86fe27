// stride_pla: the NextHit() / K1 lookup table of a bank controller.
//
// Memory is viewed as 2**LOG_BANKS word-interleaved logical banks. Only the low
// LOG_BANKS bits of the stride matter for which banks a vector touches. Write
// that part of the stride as sigma * 2**s with sigma odd. Then:
//   s      - number of trailing zero bits; only every 2**s-th bank is hit,
//   delta  - NextHit(S) = 2**(m-s): a bank holding V[k] also holds V[k+delta],
//   k1     - K1, the smallest element index that lands 2**s banks past the
//            base's bank; FirstHit for a bank i*2**s away is (K1*i) mod 2**(m-s).
// K1 is the inverse of sigma modulo 2**(m-s). The algorithm (trailing zeros,
// K1, delta, all read from one table indexed by the stride) follows the
// paper; the table contents here are produced at elaboration by a
// constant function that searches for the smallest k with k*S = 2**s
// (mod 2**m). A stride that is a multiple of the bank count (s = m) hits only
// the base's bank, every element (delta = 1); k1 is then 0.
//
// Interface: purely combinational, stride_lo -> {s, k1, delta}.
module stride_pla #(
  parameter int LOG_BANKS = 7                      // m = log2(logical banks)
) (
  input  logic [LOG_BANKS-1:0]         stride_lo,  // V.S mod 2**m
  output logic [$clog2(LOG_BANKS+1)-1:0] s,        // trailing zeros of stride_lo
  output logic [LOG_BANKS-1:0]         k1,         // K1
  output logic [LOG_BANKS:0]           delta       // NextHit = 2**(m-s)
);
  localparam int NB  = 1 << LOG_BANKS;
  localparam int S_W = $clog2(LOG_BANKS + 1);

  typedef struct packed {
    logic [S_W-1:0]       s;
    logic [LOG_BANKS-1:0] k1;
    logic [LOG_BANKS:0]   delta;
  } entry_t;

  // Table entry for stride v (elaboration time only).
  function automatic entry_t make_entry(int v);
    entry_t e;
    int tz;
    tz = LOG_BANKS;
    for (int b = LOG_BANKS - 1; b >= 0; b--)
      if (((v >> b) & 1) == 1) tz = b;
    e.s     = S_W'(tz);
    e.delta = (LOG_BANKS+1)'(1 << (LOG_BANKS - tz));
    e.k1    = '0;
    if (tz < LOG_BANKS) begin
      for (int k = NB - 1; k >= 1; k--)
        if (((k * v) % NB) == (1 << tz)) e.k1 = LOG_BANKS'(k);
    end
    return e;
  endfunction

  entry_t rom [NB];
  for (genvar v = 0; v < NB; v++) begin : g_rom
    assign rom[v] = make_entry(v);
  end

  entry_t sel;
  always_comb begin
    sel   = rom[stride_lo];
    s     = sel.s;
    k1    = sel.k1;
    delta = sel.delta;
  end
endmodule
