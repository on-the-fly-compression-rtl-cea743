// diff_enc -- difference compression of one 32-bit word against a base word.
//
// The word is compared with the base. Head is the 5-bit index i of the most
// significant bit in which they differ; the remainder is bits i..0 of the
// word, so the code is 5 + i + 1 bits (6..37). Bits above i are equal to the
// base and are not stored. A word equal to the base is coded with i = 0.
//
// The 5-bit Head and "store the remainder" follow the published algorithm.
// Keeping bit i itself in the remainder (rather than implying it) and the
// i = 0 code for an equal word are this design's reading. Which word serves
// as the base is decided by the instantiating component. Combinational.
module diff_enc
  import ocda_pkg::*;
(
  input  word_t word,
  input  word_t base,
  output code_t code,   // right-aligned, bit len-1 first
  output len_t  len
);

  always_comb begin
    word_t                  x;
    logic [DIFF_HEAD_W-1:0] i;
    code_t                  mask;
    x = word ^ base;
    i = '0;
    for (int k = 0; k < WORD_W; k++) begin
      if (x[k]) i = DIFF_HEAD_W'(k);
    end
    mask = (code_t'(1) << (i + 1)) - code_t'(1);
    code = (code_t'(i) << (i + 1)) | (code_t'(word) & mask);
    len  = len_t'(DIFF_HEAD_W) + len_t'(i) + len_t'(1);
  end

endmodule
