// pva_pkg: types and constants shared by the Parallel Vector Access (PVA) unit.
//
// A memory vector is the tuple <B, S, L>: base word address, stride in words
// and number of elements. The vector command unit breaks application requests
// into such commands and broadcasts them on the vector bus; every bank
// controller works out on its own which elements live in its DRAM bank.
//
// Sizes fixed here: 32-bit word addresses and 32-bit data words, vectors of at
// most one cache line (16 words, the line size used in the cache-line fill
// example), and 512-word SDRAM rows (a 2048-byte row of 4-byte words). The
// word and address widths and the row size are this design's choices; the
// 16-word line follows the line-fill example of the SDRAM timing discussion.
package pva_pkg;

  localparam int ADDR_W = 32;                  // word address width
  localparam int DATA_W = 32;                  // data word width
  localparam int LMAX   = 16;                  // longest memory vector (one cache line)
  localparam int LEN_W  = $clog2(LMAX + 1);    // holds 0..LMAX
  localparam int IDX_W  = $clog2(LMAX);        // element index 0..LMAX-1
  localparam int COL_W  = 9;                   // words per SDRAM row = 2**COL_W
  localparam int ROW_W  = ADDR_W - COL_W;      // widest possible row number

  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [DATA_W-1:0] data_t;
  typedef logic [LEN_W-1:0]  len_t;
  typedef logic [IDX_W-1:0]  idx_t;
  typedef logic [ROW_W-1:0]  row_t;
  typedef logic [COL_W-1:0]  col_t;

  // One vector bus command. 'offset' is the position of element 0 of this
  // command within the cache line being gathered or scattered; it is non-zero
  // only for the second and later pieces of a vector split at a superpage.
  typedef struct packed {
    logic  write;    // 1: scatter (store), 0: gather (load)
    addr_t base;     // V.B
    addr_t stride;   // V.S
    len_t  len;      // V.L
    idx_t  offset;   // line position of element 0
  } vec_cmd_t;

  // SDRAM command set seen at a DRAM bank's pins.
  typedef enum logic [2:0] {
    SD_NOP   = 3'd0,
    SD_ACT   = 3'd1,   // row address strobe: open a row
    SD_READ  = 3'd2,   // column address strobe, read one word
    SD_WRITE = 3'd3,   // column address strobe, write one word
    SD_PRE   = 3'd4    // precharge: close the open row
  } sd_cmd_e;

endpackage
