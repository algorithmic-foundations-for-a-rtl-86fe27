// sdram_bank_model: behavioural model of the SDRAM devices of one physical
// bank, for simulation only (not synthesizable: associative-array storage).
// The bank may be made of SLOTS memory slots on shared pins; sd_cs selects the
// slot a command is for, and every slot has its own open row and timers.
//
// Commands: ACT opens a row, READ/WRITE access one word of the open row, PRE
// closes it. READ data appear on sd_rdata T_CL clock edges after the READ
// edge and stay until the next READ's data replace them. A word never written
// reads as init_word(global address), so a checker can predict it. The model
// counts protocol violations: a column command with no row open or sooner
// than T_RCD after ACT, ACT with a row open or sooner than T_RP after PRE, a
// command whose chip select is not one-hot, or a row outside the selected slot.
module sdram_bank_model
  import pva_pkg::*;
#(
  parameter int M_PHYS  = 8,
  parameter int N_WORDS = 16,
  parameter int BANK    = 0,
  parameter int T_RCD   = 2,
  parameter int T_CL    = 2,
  parameter int T_RP    = 2,
  parameter int SLOTS   = 1
) (
  input  logic    clk,
  input  sd_cmd_e sd_cmd,
  input  logic [SLOTS-1:0] sd_cs,
  input  row_t    sd_row,
  input  col_t    sd_col,
  input  data_t   sd_wdata,
  output data_t   sd_rdata,
  output int      violations,
  output int      n_act,
  output int      n_pre
);
  localparam int NB = $clog2(N_WORDS);
  localparam int MB = $clog2(M_PHYS);
  localparam int SLB = $clog2(SLOTS);
  localparam int ROWBITS = ADDR_W - MB - COL_W;   // row bits of a bank-local address

  data_t mem [addr_t];
  data_t q [T_CL];
  logic  open_q [SLOTS];
  row_t  row_q [SLOTS];
  int    since_act [SLOTS], since_pre [SLOTS];

  function automatic data_t init_word(addr_t a);
    return (a * 32'h9E37_79B1) ^ 32'h0F0F_1234;
  endfunction

  function automatic addr_t global_of(row_t r, col_t c);
    addr_t loc;
    loc = (addr_t'(r) << COL_W) | addr_t'(c);
    return ((loc >> NB) << (NB + MB)) | (addr_t'(BANK) << NB) | (loc & addr_t'(N_WORDS - 1));
  endfunction

  initial begin
    violations = 0;
    n_act = 0;
    n_pre = 0;
    for (int i = 0; i < T_CL; i++) q[i] = '0;
    for (int i = 0; i < SLOTS; i++) begin
      open_q[i] = 1'b0;
      row_q[i] = '0;
      since_act[i] = 100;
      since_pre[i] = 100;
    end
  end

  assign sd_rdata = q[T_CL-1];

  always @(posedge clk) begin
    addr_t g;
    int    sl;
    sl = 0;
    for (int i = 0; i < SLOTS; i++) if (sd_cs[i]) sl = i;
    for (int i = 0; i < SLOTS; i++) begin
      since_act[i] <= since_act[i] + 1;
      since_pre[i] <= since_pre[i] + 1;
    end
    for (int i = 1; i < T_CL; i++) q[i] <= q[i-1];
    g = global_of(row_q[sl], sd_col);
    if (sd_cmd != SD_NOP) begin
      if ($countones(sd_cs) != 1) violations <= violations + 1;
      if (SLOTS > 1 && int'(sd_row >> (ROWBITS - SLB)) != sl) violations <= violations + 1;
    end
    case (sd_cmd)
      SD_ACT: begin
        if (open_q[sl] || since_pre[sl] < T_RP) violations <= violations + 1;
        open_q[sl]    <= 1'b1;
        row_q[sl]     <= sd_row;
        since_act[sl] <= 1;
        n_act         <= n_act + 1;
      end
      SD_PRE: begin
        open_q[sl]    <= 1'b0;
        since_pre[sl] <= 1;
        n_pre         <= n_pre + 1;
      end
      SD_READ: begin
        if (!open_q[sl] || since_act[sl] < T_RCD || sd_row != row_q[sl]) violations <= violations + 1;
        q[0] <= mem.exists(g) ? mem[g] : init_word(g);
      end
      SD_WRITE: begin
        if (!open_q[sl] || since_act[sl] < T_RCD || sd_row != row_q[sl]) violations <= violations + 1;
        mem[g] = sd_wdata;
      end
      default: ;
    endcase
  end
endmodule
