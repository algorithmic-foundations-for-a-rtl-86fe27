// page_splitter: how many elements of a vector fit in the current superpage.
//
// A vector can be gathered in parallel only while it stays inside one
// (super)page. Rather than dividing the distance to the end of the page by the
// stride, the stride is rounded up to the next power of two and the division
// becomes a shift: count = ((page_end - B) >> ceil(log2 S)) + 1, capped at L.
// This is a lower bound on the elements really inside the page, and always at
// least 1, so a vector is covered in a few pieces. The method is the paper's;
// the superpage size (PAGE_BITS) is this design's choice, and a zero stride
// (all elements at B) keeps the whole vector in one piece.
//
// Interface: purely combinational. next_base/rest describe what is left.
module page_splitter
  import pva_pkg::*;
#(
  parameter int PAGE_BITS = 20              // superpage = 2**PAGE_BITS words
) (
  input  addr_t base,
  input  addr_t stride,
  input  len_t  len,
  output len_t  count,                      // elements for this piece
  output addr_t next_base,                  // base of the remaining elements
  output len_t  rest,                       // elements left over
  output logic  split                       // the vector does not end here
);
  localparam addr_t PAGE_MASK = addr_t'((64'd1 << PAGE_BITS) - 1);

  addr_t to_end, bound, sm1;
  logic [$clog2(ADDR_W+1)-1:0] shamt;

  always_comb begin
    to_end = ~base & PAGE_MASK;               // words from B to the page's last word
    // shamt = ceil(log2(stride)) = bit length of (stride - 1)
    sm1   = stride - addr_t'(1);
    shamt = '0;
    for (int b = 0; b < ADDR_W; b++)
      if (sm1[b]) shamt = ($clog2(ADDR_W+1))'(b + 1);
    bound = (to_end >> shamt) + addr_t'(1);
    if (stride == '0 || bound >= addr_t'(len)) count = len;
    else                                      count = len_t'(bound);
    rest      = len - count;
    next_base = base + stride * addr_t'(count);
    split     = (rest != '0);
  end
endmodule
