// firsthit_pla: FirstHit(V, b) read directly from one table indexed by the
// bank distance and the stride.
//
// This is the table form of FirstHit for small memories: every answer is
// worked out in advance for each pair (d, S mod 2**m), where d = (b - b0) mod
// 2**m is the distance of this logical bank from the bank of the vector's
// base. The table holds "d is a multiple of 2**s" and the smallest element
// index k with k*S = d (mod 2**m); the index is then compared with the vector
// length, as in firsthit_unit. No multiplier is needed, but the table has
// 2**(2m) entries, so its size grows with the square of the bank count and it
// suits memories of up to about 16 logical banks (the default, m = 4).
//
// Follows the paper: one lookup taking (d, S) and returning K_i or "no hit",
// and its use for small bank counts. This design's own choices: the table is
// filled at elaboration by a constant function that searches for the
// smallest k (no stored data), and the length test sits next to the table.
//
// Interface: purely combinational, {bank, b0, stride_lo, len} -> {hit,
// first_idx}; the same outputs as firsthit_unit, so the two are interchangeable
// inside a bank controller.
module firsthit_pla
  import pva_pkg::*;
#(
  parameter int LOG_BANKS = 4                     // m = log2(logical banks)
) (
  input  logic [LOG_BANKS-1:0] bank,              // this logical bank, b
  input  logic [LOG_BANKS-1:0] b0,                // DecodeBank(V.B)
  input  logic [LOG_BANKS-1:0] stride_lo,         // V.S mod 2**m
  input  len_t                 len,               // V.L
  output logic                 hit,
  output logic [LOG_BANKS-1:0] first_idx          // FirstHit(V, b) when hit
);
  localparam int NB = 1 << LOG_BANKS;

  typedef struct packed {
    logic                 reach;                  // some element lands on d
    logic [LOG_BANKS-1:0] ki;                     // smallest such element
  } entry_t;

  // Entry for distance d and stride v (elaboration time only).
  function automatic entry_t make_entry(int d, int v);
    entry_t e;
    e = '0;
    for (int k = NB - 1; k >= 0; k--)
      if (((k * v) % NB) == d) begin
        e.reach = 1'b1;
        e.ki    = LOG_BANKS'(k);
      end
    return e;
  endfunction

  entry_t rom [NB * NB];
  for (genvar v = 0; v < NB; v++) begin : g_stride
    for (genvar d = 0; d < NB; d++) begin : g_dist
      assign rom[v * NB + d] = make_entry(d, v);
    end
  end

  logic [LOG_BANKS-1:0] d;
  entry_t               sel;
  always_comb begin
    d         = bank - b0;                        // wraps mod 2**m
    sel       = rom[{stride_lo, d}];
    first_idx = sel.ki;
    hit       = sel.reach && ((LOG_BANKS+LEN_W)'(sel.ki) < (LOG_BANKS+LEN_W)'(len));
  end
endmodule
