// tbc_enc -- table-based compression of one 32-bit bytecode word.
//
// The word carries four bytecodes, the first in bits 31:24. Each bytecode
// that belongs to the 16-entry set S is coded as Head=1 followed by its 4-bit
// index in S (5 bits); any other bytecode as Head=0 followed by the bytecode
// itself (9 bits). The four codes are concatenated in order, so a word takes
// 20 to 36 bits. All four lookups are done in parallel against the 16 table
// entries; if a bytecode appears in S twice the lowest index is used.
//
// Purely combinational: code/len are valid in the same cycle as word.
// The code format follows the published algorithm; the byte order inside the
// word and the duplicate rule are this design's choice.
module tbc_enc
  import ocda_pkg::*;
(
  input  word_t     word,
  input  bc_table_t table_s,
  output code_t     code,   // right-aligned, bit len-1 first
  output len_t      len
);

  always_comb begin
    logic [BC_W-1:0]    bc;
    logic               hit;
    logic [S_IDX_W-1:0] idx;
    code = '0;
    len  = '0;
    for (int b = 0; b < BC_PER_WORD; b++) begin
      bc  = word[WORD_W-1-BC_W*b -: BC_W];
      hit = 1'b0;
      idx = '0;
      for (int k = S_SIZE-1; k >= 0; k--) begin
        if (table_s[k] == bc) begin
          hit = 1'b1;
          idx = S_IDX_W'(k);
        end
      end
      if (hit) begin
        code = (code << (S_IDX_W + 1)) | code_t'({1'b1, idx});
        len  = len + len_t'(S_IDX_W + 1);
      end else begin
        code = (code << (BC_W + 1)) | code_t'({1'b0, bc});
        len  = len + len_t'(BC_W + 1);
      end
    end
  end

endmodule
