// ocda_cc -- Compression Component of the accelerator.
//
// Takes the uncompressed words of one block from the Java processor side, one
// word per cycle, each tagged with the scheme chosen for its address. The
// word is coded by the matching scheme unit (table-based, difference,
// zero-removal, or passed through as 32 raw bits) and the variable-length code
// is appended to a 96-bit bit buffer. Full 32-bit words leave the buffer
// towards the bus, first code bit in bit 31. After the block's last word the
// buffer is flushed, the final word padded with zeros, and the compressed code
// length (CCL, in bits) is reported for the address table.
//
// Difference base: the previous difference-coded word of the same block; the
// first one in a block is compared with zero, so blocks decode independently.
//
// Interface: in_* and out_* are valid/ready streams. A word is taken when
// in_valid && in_ready; in_ready drops while the buffer could not take a
// longest (37-bit) code and while a block is being flushed. out_idx numbers
// the output words of the block from 0; out_last marks the final one, and in
// that same cycle ccl_valid pulses with ccl_bits.
// Timing: one word per cycle in; the code of a word sits in the buffer one
// cycle after it is taken.
//
// The scheme split, the Head fields and "send the CCL to the address table"
// follow the published design; buffer size, padding, base choice and the
// streaming handshake are this design's own.
module ocda_cc
  import ocda_pkg::*;
#(
  parameter int unsigned BLOCK_WORDS = 16,
  localparam int unsigned CCL_W = $clog2(BLOCK_WORDS * CODE_MAX + 1),
  localparam int unsigned IDX_W = $clog2((BLOCK_WORDS * CODE_MAX + WORD_W - 1) / WORD_W + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  bc_table_t        table_s,
  // uncompressed words in
  input  logic             in_valid,
  output logic             in_ready,
  input  word_t            in_data,
  input  scheme_e          in_scheme,
  input  logic             in_first,
  input  logic             in_last,
  // packed compressed words out
  output logic             out_valid,
  input  logic             out_ready,
  output word_t            out_data,
  output logic [IDX_W-1:0] out_idx,
  output logic             out_last,
  // compressed code length of the block just finished
  output logic             ccl_valid,
  output logic [CCL_W-1:0] ccl_bits
);

  localparam int unsigned BUF_W = 96;
  localparam int unsigned CNT_W = $clog2(BUF_W + 1);

  logic [BUF_W-1:0] buf_q;
  logic [CNT_W-1:0] cnt_q;
  logic             flush_q;
  logic [IDX_W-1:0] idx_q;
  logic [CCL_W-1:0] bits_q;
  word_t            base_q;

  // ---- scheme units ----
  code_t tbc_code, zr_code, diff_code, sel_code;
  len_t  tbc_len,  zr_len,  diff_len,  sel_len;
  word_t base_eff;

  assign base_eff = in_first ? '0 : base_q;

  tbc_enc  u_tbc  (.word(in_data), .table_s(table_s), .code(tbc_code), .len(tbc_len));
  zr_enc   u_zr   (.word(in_data), .code(zr_code), .len(zr_len));
  diff_enc u_diff (.word(in_data), .base(base_eff), .code(diff_code), .len(diff_len));

  always_comb begin
    unique case (in_scheme)
      SCH_TABLE: begin sel_code = tbc_code;  sel_len = tbc_len;  end
      SCH_DIFF:  begin sel_code = diff_code; sel_len = diff_len; end
      SCH_ZERO:  begin sel_code = zr_code;   sel_len = zr_len;   end
      default:   begin sel_code = code_t'(in_data); sel_len = len_t'(WORD_W); end
    endcase
  end

  // ---- bit buffer ----
  logic in_fire, out_fire;

  assign in_ready  = !flush_q && (cnt_q <= CNT_W'(BUF_W - CODE_MAX));
  assign out_valid = (cnt_q >= CNT_W'(WORD_W)) || (flush_q && cnt_q != '0);
  assign out_last  = flush_q && (cnt_q <= CNT_W'(WORD_W));
  assign out_data  = buf_q[BUF_W-1 -: WORD_W];
  assign out_idx   = idx_q;
  assign in_fire   = in_valid && in_ready;
  assign out_fire  = out_valid && out_ready;

  assign ccl_valid = out_fire && out_last;
  assign ccl_bits  = bits_q;

  logic [BUF_W-1:0] buf_d;
  logic [CNT_W-1:0] cnt_d;

  always_comb begin
    buf_d = buf_q;
    cnt_d = cnt_q;
    if (out_fire) begin
      buf_d = buf_d << WORD_W;
      cnt_d = (cnt_d >= CNT_W'(WORD_W)) ? cnt_d - CNT_W'(WORD_W) : '0;
    end
    if (in_fire) begin
      buf_d = buf_d | ((BUF_W)'(sel_code) << (CNT_W'(BUF_W) - cnt_d - CNT_W'(sel_len)));
      cnt_d = cnt_d + CNT_W'(sel_len);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buf_q   <= '0;
      cnt_q   <= '0;
      flush_q <= 1'b0;
      idx_q   <= '0;
      bits_q  <= '0;
      base_q  <= '0;
    end else begin
      buf_q <= buf_d;
      cnt_q <= cnt_d;
      if (in_fire) begin
        bits_q <= (in_first ? '0 : bits_q) + CCL_W'(sel_len);
        if (in_scheme == SCH_DIFF) base_q <= in_data;
        else if (in_first)         base_q <= '0;
        if (in_last) flush_q <= 1'b1;
      end
      if (out_fire) begin
        if (out_last) begin
          flush_q <= 1'b0;
          idx_q   <= '0;
        end else begin
          idx_q <= idx_q + 1'b1;
        end
      end
    end
  end

  // A block's words must not overrun the buffer.
  a_rule: assert property (@(posedge clk) disable iff (!rst_n) cnt_q <= CNT_W'(BUF_W))
    else $error("ocda_cc: bit buffer overrun");

endmodule
