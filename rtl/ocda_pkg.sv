// ocda_pkg -- types and constants shared by the compression/decompression
// accelerator (OCDA).
//
// The accelerator sits between a Java processor's internal RAM and the system
// bus. Every 32-bit word of a JOP executable image is coded with one of three
// schemes chosen by the area of the image the word lives in, or left as it is:
//   SCH_TABLE  table-based code for bytecode words (4 bytecodes per word)
//   SCH_DIFF   difference code against a base word (special pointers, method table)
//   SCH_ZERO   zero-removal code (static fields, class information)
//   SCH_NONE   stored unchanged (string table, constant pool, header)
// The code sizes (8-bit bytecodes, a 16-entry set S with 4-bit indices, 1-bit
// heads, a 5-bit difference head) follow the published scheme descriptions.
// The 2-bit scheme encoding and the code bit order (first bit = MSB) are this
// design's own choices.
package ocda_pkg;

  localparam int unsigned WORD_W      = 32;  // bus / RAM word
  localparam int unsigned BC_W        = 8;   // one bytecode
  localparam int unsigned BC_PER_WORD = WORD_W / BC_W;
  localparam int unsigned S_SIZE      = 16;  // size of the frequent-bytecode set S
  localparam int unsigned S_IDX_W     = 4;   // code of a bytecode in S
  localparam int unsigned DIFF_HEAD_W = 5;   // Head = index of the highest differing bit

  // Longest code of any scheme: difference code, 5-bit head + 32-bit remainder.
  localparam int unsigned CODE_MAX = DIFF_HEAD_W + WORD_W;
  localparam int unsigned LEN_W    = $clog2(CODE_MAX + 1);

  typedef enum logic [1:0] {
    SCH_NONE  = 2'd0,
    SCH_TABLE = 2'd1,
    SCH_DIFF  = 2'd2,
    SCH_ZERO  = 2'd3
  } scheme_e;

  // A code is held right-aligned: bit len-1 is sent first, bit 0 last.
  typedef logic [CODE_MAX-1:0] code_t;
  typedef logic [LEN_W-1:0]    len_t;
  typedef logic [WORD_W-1:0]   word_t;

  // The set S: entry k holds the bytecode whose 4-bit code is k.
  typedef logic [S_SIZE-1:0][BC_W-1:0] bc_table_t;

endpackage
