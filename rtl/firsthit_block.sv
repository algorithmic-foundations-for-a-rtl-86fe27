// firsthit_block: FirstHit(V, b) for all N_WORDS logical banks of one
// physical bank, from a single FirstHit unit and a chain of adders.
//
// The logical banks of physical bank p are p*N .. p*N+N-1, so their distances
// from the base's bank b0 are consecutive: d_j = (p*N + j - b0) mod 2**m. Only
// every 2**s-th of them can hold elements. The first such lane is
// j0 = (-d_0) mod 2**s; if it lies inside the block, one firsthit_unit gives
// its first index K. Each later hitting lane is 2**s banks further on, i.e.
// one step of i in K_i = (K1 * i) mod 2**(m-s), so its index is the previous
// one plus K1, modulo 2**(m-s). Every index is then compared with the length.
//
// Follows the paper: for block-interleaved memory, one FirstHit instance for
// the first hit inside the block and an adder for each following K_{i+1},
// trading the N copies of FirstHit for a longer combinational path. This
// design's own choices: the adders form one combinational chain (all lanes in
// the same cycle), and the lane j0 is found by a subtract and mask.
//
// Interface: purely combinational. s and k1 come from stride_pla; hit[j] and
// first_idx[j] belong to logical bank BANK*N_WORDS + j.
module firsthit_block
  import pva_pkg::*;
#(
  parameter int LOG_BANKS = 7,                    // m
  parameter int N_WORDS   = 16,                   // logical banks per physical bank
  parameter int BANK      = 0                     // physical bank number p
) (
  input  logic [LOG_BANKS-1:0]           b0,
  input  logic [$clog2(LOG_BANKS+1)-1:0] s,
  input  logic [LOG_BANKS-1:0]           k1,
  input  len_t                           len,
  output logic [N_WORDS-1:0]             hit,
  output logic [LOG_BANKS-1:0]           first_idx [N_WORDS]
);
  localparam int LW = LOG_BANKS + LEN_W;

  logic [LOG_BANKS-1:0] d0, low_mask, k_mask, j0, acc;
  logic [LOG_BANKS-1:0] fu_bank, fu_idx;
  logic                 has_first, fu_hit;

  always_comb begin
    d0        = LOG_BANKS'(BANK * N_WORDS) - b0;
    low_mask  = LOG_BANKS'((1 << s) - 1);                        // 2**s - 1
    k_mask    = LOG_BANKS'((1 << (LOG_BANKS - int'(s))) - 1);    // 2**(m-s) - 1
    j0        = (-d0) & low_mask;
    has_first = (LW)'(j0) < (LW)'(N_WORDS);
    fu_bank   = LOG_BANKS'(BANK * N_WORDS) + j0;
  end

  firsthit_unit #(.LOG_BANKS(LOG_BANKS)) u_fh (
    .bank      (fu_bank),
    .b0        (b0),
    .s         (s),
    .k1        (k1),
    .len       (len),
    .hit       (fu_hit),
    .first_idx (fu_idx)
  );

  always_comb begin
    acc = fu_idx;
    for (int j = 0; j < N_WORDS; j++) begin
      hit[j]       = 1'b0;
      first_idx[j] = '0;
      if (has_first && LOG_BANKS'(j) >= j0 && ((LOG_BANKS'(j) - j0) & low_mask) == '0) begin
        first_idx[j] = acc;
        hit[j]       = (LOG_BANKS'(j) == j0) ? fu_hit : ((LW)'(acc) < (LW)'(len));
        acc          = (acc + k1) & k_mask;                    // K_{i+1} = K_i + K1
      end
    end
  end
endmodule
