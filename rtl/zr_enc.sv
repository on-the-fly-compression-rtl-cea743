// zr_enc -- zero-removal compression of one 32-bit word.
//
// A word whose four bytes are all zero is coded as the single bit 0 (Head=0).
// Any other word is coded as Head=1 followed by the 32 original bits, 33 bits
// in all. Combinational; follows the published algorithm exactly.
// Code bits 36:33 are always zero here: the code type is sized for the
// longest code of any scheme (37 bits), the longest zero-removal code is 33.
module zr_enc
  import ocda_pkg::*;
(
  input  word_t word,
  output code_t code,   // right-aligned, bit len-1 first
  output len_t  len
);

  always_comb begin
    if (word == '0) begin
      code = '0;
      len  = len_t'(1);
    end else begin
      code = code_t'({1'b1, word});
      len  = len_t'(WORD_W + 1);
    end
  end

endmodule
