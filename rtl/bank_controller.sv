// bank_controller: one Bank Controller (BC) of the Parallel Vector Access unit.
//
// Every BC sees every vector command <B, S, L> broadcast on the vector bus and
// works out by itself which elements of the vector live in its DRAM bank,
// without expanding the vector element by element. Its physical bank of
// N_WORDS-word blocks is treated as N_WORDS word-wide logical banks; the whole
// memory is then M_PHYS*N_WORDS = 2**m word-interleaved logical banks, where
// FirstHit() needs no case analysis. Physical bank p holds logical banks
// p*N_WORDS .. p*N_WORDS+N_WORDS-1.
//
// Pipeline after a command (cmd_valid on clock edge E0):
//   E0->E1  stride table (s, K1, delta) and one FirstHit unit per logical bank;
//           each logical bank ("lane") registers hit and its first index K_i.
//   E1->E2  lane address B + S*K_i (a small multiply per lane).
//   from E2 issue: every cycle the lane with the lowest pending element index
//           hands one word access to the SDRAM sequencer, then steps its index
//           by delta = NextHit(S) = 2**(m-s) and its address by S << (m-s).
// So the first SDRAM command leaves 3 edges after the command. Elements of a
// bank go out in ascending index order, which also keeps the rows of a
// positive-stride vector in ascending order.
//
// Follows the paper: the logical word-interleaved view, DecodeBank by bit
// selection, FirstHit = (K1*(d>>s)) mod 2**(m-s) from one table per BC shared
// by N_WORDS FirstHit units, NextHit = 2**(m-s), addr = B + S*FirstHit then
// repeated shift-and-add, and (for a bank with few banks) one FirstHit unit
// per logical bank. This design's choices: the three-stage pipeline, serving
// the lanes lowest index first, one access per cycle per physical bank (the
// logical banks share the bank's bus), and data paths: a scatter takes its
// word from the line (wline) by index, a gather returns (index, word).
//
// FirstHit can be built in the three ways the paper lists, chosen by
// FH_STYLE: 0 (default) one K1*i unit per logical bank, the choice the paper
// recommends for few banks with block interleaving; 1 one (d, S) table per
// logical bank, for memories of about 16 logical banks or fewer (its table
// grows with the square of the bank count); 2 one unit for the first hit in
// the block and a chain of adders for the rest. All three give the same
// lanes, so the controller behaves identically cycle for cycle.
//
// Capacity: a bank may hold SLOTS memory slots on shared pins; the top
// log2(SLOTS) bits of the bank-local address select the slot, and the
// sequencer keeps one current-row register and one chip select per slot (one
// of the ways the paper gives to grow memory with M and N fixed). The default
// of one slot is the plain organisation with one DRAM bank per controller.
//
// Interface: cmd_valid/cmd for one cycle per command (must only come while
// busy is low); busy stays high until every access is issued and every read
// has returned. ret_valid/ret_idx/ret_data carry each gathered word with its
// position in the cache line. Reset is synchronous and active low.
module bank_controller
  import pva_pkg::*;
#(
  parameter int M_PHYS  = 8,    // physical banks (M)
  parameter int N_WORDS = 16,   // interleave block in words (N)
  parameter int BANK    = 0,    // this controller's physical bank number
  parameter int T_RCD   = 2,
  parameter int T_CL    = 2,
  parameter int T_RP    = 2,
  parameter int SLOTS   = 1,    // memory slots sharing this bank's pins
  parameter int FH_STYLE = 0    // FirstHit build: 0 K1*i per lane, 1 (d,S) table, 2 one unit + adders
) (
  input  logic     clk,
  input  logic     rst_n,
  // vector bus
  input  logic     cmd_valid,
  input  vec_cmd_t cmd,
  input  data_t    wline [LMAX],   // line being scattered
  output logic     busy,
  // gathered words
  output logic     ret_valid,
  output idx_t     ret_idx,
  output data_t    ret_data,
  // event strobes (statistics)
  output logic     ev_access,      // one word access issued to the DRAM
  output logic     ev_row_hit,
  output logic     ev_row_miss,
  // DRAM bank pins
  output sd_cmd_e  sd_cmd,
  output logic [SLOTS-1:0] sd_cs,
  output row_t     sd_row,
  output col_t     sd_col,
  output data_t    sd_wdata,
  input  data_t    sd_rdata
);
  localparam int LB   = $clog2(M_PHYS * N_WORDS);   // m, logical bank bits
  localparam int NB   = $clog2(N_WORDS);            // n
  localparam int MB   = $clog2(M_PHYS);
  localparam int S_W  = $clog2(LB + 1);
  localparam int SUMW = LB + LEN_W + 1;             // index + delta without overflow
  localparam int SELW = (N_WORDS > 1) ? $clog2(N_WORDS) : 1;
  localparam int LOCW = ADDR_W - MB;                // bank-local address bits
  localparam int SLB  = $clog2(SLOTS);              // slot bits, top of LOCW
  localparam int SLW  = (SLOTS > 1) ? SLB : 1;

  typedef enum logic [1:0] {ST_IDLE, ST_FH, ST_ADDR, ST_RUN} state_e;
  state_e state;

  vec_cmd_t             cmd_q;
  logic [LB:0]          delta_q;
  addr_t                step_q;
  logic [N_WORDS-1:0]   lane_v;
  idx_t                 lane_idx  [N_WORDS];
  addr_t                lane_addr [N_WORDS];

  // ---- FirstHit / NextHit -------------------------------------------------
  logic [S_W-1:0] s;
  logic [LB-1:0]  k1;
  logic [LB:0]    delta;
  logic [LB-1:0]  b0;
  logic [N_WORDS-1:0] fh_hit;
  logic [LB-1:0]  fh_idx [N_WORDS];

  assign b0 = cmd_q.base[LB-1:0];                   // DecodeBank in the logical view

  stride_pla #(.LOG_BANKS(LB)) u_pla (
    .stride_lo (cmd_q.stride[LB-1:0]),
    .s         (s),
    .k1        (k1),
    .delta     (delta)
  );

  if (FH_STYLE == 1) begin : g_fh_table
    for (genvar j = 0; j < N_WORDS; j++) begin : g_lane
      firsthit_pla #(.LOG_BANKS(LB)) u_fh (
        .bank      (LB'(BANK * N_WORDS + j)),
        .b0        (b0),
        .stride_lo (cmd_q.stride[LB-1:0]),
        .len       (cmd_q.len),
        .hit       (fh_hit[j]),
        .first_idx (fh_idx[j])
      );
    end
  end else if (FH_STYLE == 2) begin : g_fh_chain
    firsthit_block #(.LOG_BANKS(LB), .N_WORDS(N_WORDS), .BANK(BANK)) u_fh (
      .b0        (b0),
      .s         (s),
      .k1        (k1),
      .len       (cmd_q.len),
      .hit       (fh_hit),
      .first_idx (fh_idx)
    );
  end else begin : g_fh
    for (genvar j = 0; j < N_WORDS; j++) begin : g_lane
      firsthit_unit #(.LOG_BANKS(LB)) u_fh (
        .bank      (LB'(BANK * N_WORDS + j)),
        .b0        (b0),
        .s         (s),
        .k1        (k1),
        .len       (cmd_q.len),
        .hit       (fh_hit[j]),
        .first_idx (fh_idx[j])
      );
    end
  end

  // ---- lane selection: lowest pending index -------------------------------
  logic                       any_v;
  logic [SELW-1:0]            sel;
  always_comb begin
    any_v = 1'b0;
    sel   = '0;
    for (int j = 0; j < N_WORDS; j++) begin
      if (lane_v[j] && (!any_v || lane_idx[j] < lane_idx[sel])) begin
        sel   = SELW'(j);
        any_v = 1'b1;
      end
    end
  end

  // ---- sequencer ------------------------------------------------------------
  addr_t sel_addr, local_addr;
  logic [SLW-1:0] slot;
  idx_t  sel_line;
  logic  req_valid, req_ready, seq_idle;
  idx_t  seq_tag;

  always_comb begin
    sel_addr   = lane_addr[sel];
    // remove the physical bank bits: local = {addr[hi:n+mb], addr[n-1:0]}
    local_addr = ((sel_addr >> (NB + MB)) << NB) | (sel_addr & addr_t'(N_WORDS - 1));
    sel_line   = cmd_q.offset + lane_idx[sel];
    // the slot is selected by the top bits of the bank-local address
    slot       = (SLOTS > 1) ? SLW'(local_addr >> (LOCW - SLB)) : '0;
  end

  assign req_valid = (state == ST_RUN) && any_v;

  sdram_sequencer #(.T_RCD(T_RCD), .T_CL(T_CL), .T_RP(T_RP), .TAG_W(IDX_W),
                    .SLOTS(SLOTS)) u_seq (
    .clk         (clk),
    .rst_n       (rst_n),
    .req_valid   (req_valid),
    .req_ready   (req_ready),
    .req_write   (cmd_q.write),
    .req_slot    (slot),
    .req_row     (row_t'(local_addr >> COL_W)),
    .req_col     (col_t'(local_addr)),
    .req_wdata   (wline[sel_line]),
    .req_tag     (sel_line),
    .ret_valid   (ret_valid),
    .ret_tag     (seq_tag),
    .ret_data    (ret_data),
    .idle        (seq_idle),
    .ev_row_hit  (ev_row_hit),
    .ev_row_miss (ev_row_miss),
    .sd_cmd      (sd_cmd),
    .sd_cs       (sd_cs),
    .sd_row      (sd_row),
    .sd_col      (sd_col),
    .sd_wdata    (sd_wdata),
    .sd_rdata    (sd_rdata)
  );
  assign ret_idx   = seq_tag;
  assign ev_access = req_valid && req_ready;

  // ---- control ------------------------------------------------------------
  logic [SUMW-1:0] next_idx;
  assign next_idx = SUMW'(lane_idx[sel]) + SUMW'(delta_q);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= ST_IDLE;
      cmd_q   <= '0;
      delta_q <= '0;
      step_q  <= '0;
      lane_v  <= '0;
      for (int j = 0; j < N_WORDS; j++) begin
        lane_idx[j]  <= '0;
        lane_addr[j] <= '0;
      end
    end else begin
      unique case (state)
        ST_IDLE: if (cmd_valid) begin
          cmd_q <= cmd;
          state <= ST_FH;
        end
        ST_FH: begin
          for (int j = 0; j < N_WORDS; j++) begin
            lane_v[j]   <= fh_hit[j];
            lane_idx[j] <= idx_t'(fh_idx[j]);      // a hit is below L <= LMAX
          end
          delta_q <= delta;
          step_q  <= cmd_q.stride << (LB - int'(s)); // S * delta
          state   <= ST_ADDR;
        end
        ST_ADDR: begin
          for (int j = 0; j < N_WORDS; j++)
            lane_addr[j] <= cmd_q.base + cmd_q.stride * addr_t'(lane_idx[j]);
          state <= ST_RUN;
        end
        ST_RUN: begin
          if (req_valid && req_ready) begin
            lane_idx[sel]  <= idx_t'(next_idx);
            lane_addr[sel] <= lane_addr[sel] + step_q;
            lane_v[sel]    <= (next_idx < SUMW'(cmd_q.len));
          end else if (!any_v && seq_idle) begin
            state <= ST_IDLE;
          end
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

  assign busy = (state != ST_IDLE);

  // Every issued address must decode to this physical bank.
  a_own_bank: assert property (@(posedge clk) disable iff (!rst_n)
    req_valid |-> ((sel_addr >> NB) % M_PHYS) == addr_t'(BANK));
  // Commands arrive only while the controller is free.
  a_cmd_idle: assert property (@(posedge clk) disable iff (!rst_n)
    cmd_valid |-> state == ST_IDLE);
endmodule
