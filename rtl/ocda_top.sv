// ocda_top -- On-the-fly Compression and Decompression Accelerator (OCDA).
//
// Sits between a Java processor's internal RAM and the bus interface to main
// memory. The JOP executable image is kept in main memory in compressed form;
// each word is coded according to the image area it belongs to (bytecode,
// special pointers, static fields, class information, method table, ...).
//
// Store path (internal RAM "data out" -> bus "data write"): the processor side
// streams a block of BLOCK_WORDS words on st_* with their word addresses,
// first word block-aligned. The Compressed Address Table (CAT) gives the
// scheme of each address, the Compression Component (CC) codes and packs the
// words, and the packed words are written on bw_* to CMP_BASE + 4*(next_free
// + word index), the word address coming from the CAT. When the last packed
// word is written, the CC hands the compressed code length to the CAT, which
// records the block and advances next_free. If the compressed area could not
// hold a worst-case block, the block is consumed but not written and the
// sticky overflow flag is set.
//
// Load path (bus "data read" -> internal RAM "data in"): a block-aligned
// address on ld_req_* is looked up in the CAT (one cycle); a block that was
// never stored returns ld_err for one cycle and nothing else. Otherwise one
// burst read of the recorded word count is requested on br_req_*, the
// Decompression Component (DC) restores the words and hands them out on ld_*
// with their addresses, ld_last on the final word.
//
// Configuration: tbl_* write the 16-entry frequent-bytecode set S; rgn_*
// write the region map (start address and scheme of each image area).
// Store and load may run at the same time; a load overlapping the store of
// the same block sees the previously recorded copy.
// All streams are valid/ready; all bus addresses are byte addresses. The
// address bits above the compressed area (set by CMP_BASE and CADDR_W) and the
// two byte-offset bits of bw_addr and br_req_addr are constant by design.
//
// The three-block structure (CAT, CC, DC) and its connections follow the
// published architecture; the port protocol, block granularity and the
// overflow/missing-block handling are this design's own.
module ocda_top
  import ocda_pkg::*;
#(
  parameter int unsigned UADDR_W     = 16,
  parameter int unsigned CADDR_W     = 16,
  parameter int unsigned BLOCK_WORDS = 16,
  parameter int unsigned NUM_REGIONS = 8,
  parameter logic [31:0] CMP_BASE    = 32'h0010_0000,
  localparam int unsigned MAX_CW = (BLOCK_WORDS * CODE_MAX + WORD_W - 1) / WORD_W,
  localparam int unsigned CW_W   = $clog2(MAX_CW + 1),
  localparam int unsigned RIDX_W = (NUM_REGIONS > 1) ? $clog2(NUM_REGIONS) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  // configuration
  input  logic               tbl_we,
  input  logic [S_IDX_W-1:0] tbl_idx,
  input  logic [BC_W-1:0]    tbl_val,
  input  logic               rgn_we,
  input  logic [RIDX_W-1:0]  rgn_idx,
  input  logic [UADDR_W-1:0] rgn_start,
  input  scheme_e            rgn_scheme,
  // internal RAM side: store (data out)
  input  logic               st_valid,
  output logic               st_ready,
  input  logic [UADDR_W-1:0] st_addr,
  input  word_t              st_data,
  // internal RAM side: load request and data in
  input  logic               ld_req_valid,
  output logic               ld_req_ready,
  input  logic [UADDR_W-1:0] ld_req_addr,
  output logic               ld_err,
  output logic               ld_valid,
  input  logic               ld_ready,
  output logic [UADDR_W-1:0] ld_addr,
  output word_t              ld_data,
  output logic               ld_last,
  // bus side: data write
  output logic               bw_valid,
  input  logic               bw_ready,
  output logic [31:0]        bw_addr,
  output word_t              bw_data,
  // bus side: burst read request and data read
  output logic               br_req_valid,
  input  logic               br_req_ready,
  output logic [31:0]        br_req_addr,
  output logic [CW_W-1:0]    br_req_len,
  input  logic               br_valid,
  output logic               br_ready,
  input  word_t              br_data,
  // status
  output logic               overflow
);

  localparam int unsigned OFF_W = $clog2(BLOCK_WORDS);
  localparam int unsigned BLK_W = UADDR_W - OFF_W;
  localparam int unsigned CCL_W = $clog2(BLOCK_WORDS * CODE_MAX + 1);
  localparam int unsigned IDX_W = $clog2(MAX_CW + 1);

  // ---- frequent-bytecode set S ----
  bc_table_t table_s;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      table_s <= '0;
    else if (tbl_we) table_s[tbl_idx] <= tbl_val;
  end

  // ---- CAT ----
  logic [IDX_W-1:0]   cc_out_idx;
  scheme_e            st_scheme, ld_scheme;
  logic               alloc_valid;
  logic [BLK_W-1:0]   st_block_q;
  logic [CCL_W-1:0]   ccl_bits;
  logic               ccl_valid;
  logic [CADDR_W-1:0] wr_caddr;
  logic               space_ok;
  logic               lk_valid, lk_rsp_valid, lk_hit;
  logic [BLK_W-1:0]   lk_block;
  logic [CADDR_W-1:0] lk_caddr;
  logic [CW_W-1:0]    lk_cwords;

  ocda_cat #(
    .UADDR_W(UADDR_W), .CADDR_W(CADDR_W),
    .BLOCK_WORDS(BLOCK_WORDS), .NUM_REGIONS(NUM_REGIONS)
  ) u_cat (
    .clk, .rst_n,
    .reg_we(rgn_we), .reg_idx(rgn_idx), .reg_start(rgn_start), .reg_scheme(rgn_scheme),
    .a_addr(st_addr), .a_scheme(st_scheme),
    .b_addr(ld_addr), .b_scheme(ld_scheme),
    .alloc_valid, .alloc_block(st_block_q), .alloc_bits(ccl_bits),
    .next_free(), .space_ok,
    .wr_idx(cc_out_idx), .wr_caddr,
    .lk_valid, .lk_block, .lk_rsp_valid, .lk_hit, .lk_caddr, .lk_cwords
  );

  // ---- store path: CC ----
  logic             st_first, st_last, st_fire;
  logic             cc_out_valid, cc_out_ready;
  word_t            cc_out_data;
  logic             drop_q;   // current block does not fit: consume, do not write

  assign st_first = (st_addr[OFF_W-1:0] == '0);
  assign st_last  = (st_addr[OFF_W-1:0] == OFF_W'(BLOCK_WORDS - 1));
  assign st_fire  = st_valid && st_ready;

  ocda_cc #(.BLOCK_WORDS(BLOCK_WORDS)) u_cc (
    .clk, .rst_n, .table_s,
    .in_valid(st_valid), .in_ready(st_ready), .in_data(st_data), .in_scheme(st_scheme),
    .in_first(st_first), .in_last(st_last),
    .out_valid(cc_out_valid), .out_ready(cc_out_ready), .out_data(cc_out_data),
    .out_idx(cc_out_idx), .out_last(),
    .ccl_valid, .ccl_bits
  );

  assign bw_valid     = cc_out_valid && !drop_q;
  assign cc_out_ready = drop_q ? 1'b1 : bw_ready;
  assign bw_data      = cc_out_data;
  assign bw_addr      = CMP_BASE + {(32 - CADDR_W - 2)'(0), wr_caddr, 2'b00};
  assign alloc_valid  = ccl_valid && !drop_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_block_q <= '0;
      drop_q     <= 1'b0;
      overflow   <= 1'b0;
    end else if (st_fire && st_first) begin
      st_block_q <= st_addr[UADDR_W-1:OFF_W];
      drop_q     <= !space_ok;
      if (!space_ok) overflow <= 1'b1;
    end
  end

  // ---- load path: CAT lookup, burst request, DC ----
  typedef enum logic [1:0] {LD_IDLE, LD_LOOKUP, LD_REQ, LD_RUN} ld_state_e;
  ld_state_e          ld_state_q;
  logic [BLK_W-1:0]   ld_block_q;
  logic [CADDR_W-1:0] ld_caddr_q;
  logic [CW_W-1:0]    ld_cwords_q;
  logic               dc_start, dc_busy, dc_out_last;
  logic [OFF_W-1:0]   dc_out_idx;

  assign ld_req_ready = (ld_state_q == LD_IDLE);
  assign lk_valid     = ld_req_valid && ld_req_ready;
  assign lk_block     = ld_req_addr[UADDR_W-1:OFF_W];
  assign ld_err       = (ld_state_q == LD_LOOKUP) && lk_rsp_valid && !lk_hit;
  assign dc_start     = (ld_state_q == LD_LOOKUP) && lk_rsp_valid && lk_hit;
  assign br_req_valid = (ld_state_q == LD_REQ);
  assign br_req_addr  = CMP_BASE + {(32 - CADDR_W - 2)'(0), ld_caddr_q, 2'b00};
  assign br_req_len   = ld_cwords_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ld_state_q  <= LD_IDLE;
      ld_block_q  <= '0;
      ld_caddr_q  <= '0;
      ld_cwords_q <= '0;
    end else begin
      unique case (ld_state_q)
        LD_IDLE:   if (lk_valid) begin
                     ld_block_q <= lk_block;
                     ld_state_q <= LD_LOOKUP;
                   end
        LD_LOOKUP: if (lk_rsp_valid) begin
                     ld_caddr_q  <= lk_caddr;
                     ld_cwords_q <= lk_cwords;
                     ld_state_q  <= lk_hit ? LD_REQ : LD_IDLE;
                   end
        LD_REQ:    if (br_req_ready) ld_state_q <= LD_RUN;
        LD_RUN:    if (ld_valid && ld_ready && dc_out_last) ld_state_q <= LD_IDLE;
        default:   ld_state_q <= LD_IDLE;
      endcase
    end
  end

  ocda_dc #(.BLOCK_WORDS(BLOCK_WORDS)) u_dc (
    .clk, .rst_n, .table_s,
    .start(dc_start), .busy(dc_busy),
    .in_valid(br_valid), .in_ready(br_ready), .in_data(br_data),
    .cur_scheme(ld_scheme),
    .out_valid(ld_valid), .out_ready(ld_ready), .out_data(ld_data),
    .out_idx(dc_out_idx), .out_last(dc_out_last)
  );

  assign ld_addr = {ld_block_q, dc_out_idx};
  assign ld_last = dc_out_last;

  // ---- protocol rules ----
  if ((1 << OFF_W) != BLOCK_WORDS) begin : g_block_pow2
    $error("ocda_top: BLOCK_WORDS must be a power of two");
  end

  // store words arrive in address order, whole blocks at a time
  logic [OFF_W-1:0] st_off_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       st_off_q <= '0;
    else if (st_fire) st_off_q <= st_off_q + 1'b1;
  end
  a_st_order: assert property (@(posedge clk) disable iff (!rst_n)
      st_valid |-> st_addr[OFF_W-1:0] == st_off_q &&
                   (st_off_q == '0 || st_addr[UADDR_W-1:OFF_W] == st_block_q))
    else $error("ocda_top: store words out of order");
  a_st_hold: assert property (@(posedge clk) disable iff (!rst_n)
      st_valid && !st_ready |=> st_valid && $stable(st_addr) && $stable(st_data))
    else $error("ocda_top: store word changed while stalled");
  a_ld_align: assert property (@(posedge clk) disable iff (!rst_n)
      ld_req_valid |-> ld_req_addr[OFF_W-1:0] == '0)
    else $error("ocda_top: load address not block-aligned");
  a_dc_busy: assert property (@(posedge clk) disable iff (!rst_n)
      ld_state_q == LD_RUN |-> dc_busy)
    else $error("ocda_top: decompressor idle during a load");

endmodule
