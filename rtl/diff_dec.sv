// diff_dec -- difference decompression of one 32-bit word.
//
// Reads the 5-bit Head i from the left-aligned stream window, then the
// remainder, bits i..0 of the word. Bits above i are taken from the base
// word. Consumes 6 + i bits. Combinational; inverse of diff_enc.
module diff_dec
  import ocda_pkg::*;
(
  input  code_t win,
  input  word_t base,
  output word_t word,
  output len_t  len
);

  always_comb begin
    logic [DIFF_HEAD_W-1:0] i;
    word_t                  rem;
    word_t                  mask;
    i    = win[CODE_MAX-1 -: DIFF_HEAD_W];
    rem  = win[WORD_W-1:0] >> (WORD_W - 1 - int'(i));
    mask = (i == '1) ? '1 : (word_t'(1) << (i + 1)) - word_t'(1);
    word = (base & ~mask) | (rem & mask);
    len  = len_t'(DIFF_HEAD_W) + len_t'(i) + len_t'(1);
  end

endmodule
