// ocda_cat -- Compressed Address Table of the accelerator.
//
// Holds the two maps the accelerator needs between the uncompressed JOP image
// seen by the Java processor and the compressed copy in main memory.
//
// Region map: NUM_REGIONS programmable entries {start word address, scheme},
// written in ascending order of start address. The scheme of an address is
// that of the last region whose start is not above it. Two independent
// combinational lookup ports serve the compression side (a_*) and the
// decompression side (b_*).
//
// Block table: the image is cut into blocks of BLOCK_WORDS words. When a
// block has been compressed, its compressed code length (bits) arrives on
// alloc_*; the table rounds it up to whole words, records {compressed word
// address, word count} for the block and advances the allocation pointer
// next_free. While a block is being compressed, wr_caddr = next_free + wr_idx
// gives the main-memory word address of its packed word wr_idx.
// space_ok says whether a worst-case block still fits in the compressed area
// (keeping next_free below its top); a block may only be allocated while it
// is high.
// Blocks are only appended: rewriting a block takes fresh space.
// A lookup (lk_valid, lk_block) is answered in the next cycle on lk_rsp_*;
// lk_hit is low for a block that was never stored.
//
// That this table assigns the main-memory address from the CCL, records it,
// and tells the components which scheme applies follows the published
// design; the block granularity, the region registers and append-only
// allocation are this design's own.
module ocda_cat
  import ocda_pkg::*;
#(
  parameter int unsigned UADDR_W     = 16,  // uncompressed image: word address bits
  parameter int unsigned CADDR_W     = 16,  // compressed area: word address bits
  parameter int unsigned BLOCK_WORDS = 16,
  parameter int unsigned NUM_REGIONS = 8,
  localparam int unsigned BLK_W  = UADDR_W - $clog2(BLOCK_WORDS),
  localparam int unsigned NBLK   = 1 << BLK_W,
  localparam int unsigned CCL_W  = $clog2(BLOCK_WORDS * CODE_MAX + 1),
  localparam int unsigned MAX_CW = (BLOCK_WORDS * CODE_MAX + WORD_W - 1) / WORD_W,
  localparam int unsigned CW_W   = $clog2(MAX_CW + 1),
  localparam int unsigned RIDX_W = (NUM_REGIONS > 1) ? $clog2(NUM_REGIONS) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  // region map programming
  input  logic               reg_we,
  input  logic [RIDX_W-1:0]  reg_idx,
  input  logic [UADDR_W-1:0] reg_start,
  input  scheme_e            reg_scheme,
  // scheme lookups
  input  logic [UADDR_W-1:0] a_addr,
  output scheme_e            a_scheme,
  input  logic [UADDR_W-1:0] b_addr,
  output scheme_e            b_scheme,
  // allocation after a block is compressed
  input  logic               alloc_valid,
  input  logic [BLK_W-1:0]   alloc_block,
  input  logic [CCL_W-1:0]   alloc_bits,
  output logic [CADDR_W-1:0] next_free,
  output logic               space_ok,
  // main-memory word address of word wr_idx of the block being compressed
  input  logic [CW_W-1:0]    wr_idx,
  output logic [CADDR_W-1:0] wr_caddr,
  // block lookup for decompression
  input  logic               lk_valid,
  input  logic [BLK_W-1:0]   lk_block,
  output logic               lk_rsp_valid,
  output logic               lk_hit,
  output logic [CADDR_W-1:0] lk_caddr,
  output logic [CW_W-1:0]    lk_cwords
);

  typedef struct packed {
    logic [UADDR_W-1:0] start;
    scheme_e            scheme;
  } region_t;

  typedef struct packed {
    logic [CADDR_W-1:0] caddr;
    logic [CW_W-1:0]    cwords;
  } entry_t;

  region_t regions_q [NUM_REGIONS];
  entry_t  table_mem [NBLK];
  logic [NBLK-1:0]    valid_q;
  logic [CADDR_W-1:0] next_free_q;
  logic               rsp_valid_q, rsp_hit_q;
  entry_t             rsp_q;

  function automatic scheme_e lookup(input region_t r [NUM_REGIONS], input logic [UADDR_W-1:0] addr);
    scheme_e s;
    s = r[0].scheme;
    for (int k = 1; k < NUM_REGIONS; k++) begin
      if (addr >= r[k].start) s = r[k].scheme;
    end
    return s;
  endfunction

  assign a_scheme = lookup(regions_q, a_addr);
  assign b_scheme = lookup(regions_q, b_addr);

  logic [CW_W-1:0] alloc_words;
  assign alloc_words = CW_W'((alloc_bits + CCL_W'(WORD_W - 1)) / CCL_W'(WORD_W));

  assign next_free = next_free_q;
  assign wr_caddr  = next_free_q + CADDR_W'(wr_idx);
  // strict: next_free must stay below the top of the area
  assign space_ok  = ({1'b0, next_free_q} + (CADDR_W+1)'(MAX_CW)) < (CADDR_W+1)'(1 << CADDR_W);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NUM_REGIONS; k++) regions_q[k] <= '{start: '1, scheme: SCH_NONE};
      regions_q[0] <= '{start: '0, scheme: SCH_NONE};
      valid_q      <= '0;
      next_free_q  <= '0;
      rsp_valid_q  <= 1'b0;
      rsp_hit_q    <= 1'b0;
    end else begin
      if (reg_we) regions_q[reg_idx] <= '{start: reg_start, scheme: reg_scheme};
      if (alloc_valid) begin
        valid_q[alloc_block] <= 1'b1;
        next_free_q          <= next_free_q + CADDR_W'(alloc_words);
      end
      rsp_valid_q <= lk_valid;
      if (lk_valid) rsp_hit_q <= valid_q[lk_block];
    end
  end

  // Block table: one write port, one synchronous read port.
  always_ff @(posedge clk) begin
    if (alloc_valid) table_mem[alloc_block] <= '{caddr: next_free_q, cwords: alloc_words};
    if (lk_valid)    rsp_q <= table_mem[lk_block];
  end

  assign lk_rsp_valid = rsp_valid_q;
  assign lk_hit       = rsp_hit_q;
  assign lk_caddr     = rsp_q.caddr;
  assign lk_cwords    = rsp_q.cwords;

endmodule
