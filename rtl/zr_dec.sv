// zr_dec -- zero-removal decompression of one 32-bit word.
//
// Looks at the next bit of the left-aligned stream window: 0 gives an all-zero
// word and consumes one bit; 1 gives the following 32 bits and consumes 33.
// Combinational; follows the published algorithm.
module zr_dec
  import ocda_pkg::*;
(
  input  code_t win,
  output word_t word,
  output len_t  len
);

  always_comb begin
    if (win[CODE_MAX-1]) begin
      word = win[CODE_MAX-2 -: WORD_W];
      len  = len_t'(WORD_W + 1);
    end else begin
      word = '0;
      len  = len_t'(1);
    end
  end

endmodule
