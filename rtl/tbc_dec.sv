// tbc_dec -- table-based decompression of one 32-bit bytecode word.
//
// The input is a window onto the compressed bit stream, left-aligned: the
// next unread bit is win[CODE_MAX-1]. Four Heads are examined in sequence:
// Head=1 means a 4-bit index into the set S follows, Head=0 means an 8-bit
// bytecode follows. Because the Head fields alone give the length of each
// code, the total length (20..36 bits) is known in the same cycle and the
// stream can be advanced by that amount while the word is delivered.
//
// Purely combinational. The code format follows the published algorithm;
// the bytecode order in the word (first in bits 31:24) is this design's choice.
module tbc_dec
  import ocda_pkg::*;
(
  input  code_t     win,
  input  bc_table_t table_s,
  output word_t     word,
  output len_t      len     // bits consumed
);

  always_comb begin
    code_t w;
    w    = win;
    word = '0;
    len  = '0;
    for (int b = 0; b < BC_PER_WORD; b++) begin
      if (w[CODE_MAX-1]) begin
        word = {word[WORD_W-BC_W-1:0], table_s[w[CODE_MAX-2 -: S_IDX_W]]};
        w    = w << (S_IDX_W + 1);
        len  = len + len_t'(S_IDX_W + 1);
      end else begin
        word = {word[WORD_W-BC_W-1:0], w[CODE_MAX-2 -: BC_W]};
        w    = w << (BC_W + 1);
        len  = len + len_t'(BC_W + 1);
      end
    end
  end

endmodule
