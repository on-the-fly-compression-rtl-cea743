// ocda_dc -- Decompression Component of the accelerator.
//
// Receives the packed compressed words of one block from the bus and restores
// the BLOCK_WORDS original words for the Java processor's internal RAM. The
// bus words are appended to a 96-bit bit buffer; the top CODE_MAX bits form a
// window that all three scheme decoders look at in parallel. The Head fields
// of the selected scheme give the length of the current code at once, so a
// word can leave every cycle and the buffer advances by exactly that length.
// A word is only released once the buffer holds all of its bits.
//
// The scheme of each output word comes from outside (cur_scheme), looked up
// from the word's address, which the parent forms from out_idx. The
// difference base is the previous difference-coded word of the block, zero
// at block start, matching ocda_cc.
//
// Interface: start pulses for one cycle to begin a block (clears the buffer).
// in_* and out_* are valid/ready streams; out_last marks word BLOCK_WORDS-1,
// after which the remaining pad bits are dropped and busy falls.
// Timing: first word out one cycle after the first bus word is taken, then
// up to one word per cycle.
//
// Decoding by Head fields follows the published design; buffer size, the
// streaming handshake and the base choice are this design's own.
module ocda_dc
  import ocda_pkg::*;
#(
  parameter int unsigned BLOCK_WORDS = 16,
  localparam int unsigned OIDX_W = $clog2(BLOCK_WORDS)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  bc_table_t         table_s,
  input  logic              start,
  output logic              busy,
  // packed compressed words in
  input  logic              in_valid,
  output logic              in_ready,
  input  word_t             in_data,
  // restored words out
  input  scheme_e           cur_scheme,
  output logic              out_valid,
  input  logic              out_ready,
  output word_t             out_data,
  output logic [OIDX_W-1:0] out_idx,
  output logic              out_last
);

  localparam int unsigned BUF_W = 96;
  localparam int unsigned CNT_W = $clog2(BUF_W + 1);

  logic [BUF_W-1:0]  buf_q;
  logic [CNT_W-1:0]  cnt_q;
  logic              active_q;
  logic [OIDX_W-1:0] idx_q;
  word_t             base_q;

  code_t win;
  assign win = buf_q[BUF_W-1 -: CODE_MAX];

  word_t tbc_word, zr_word, diff_word;
  len_t  tbc_len,  zr_len,  diff_len, need;

  tbc_dec  u_tbc  (.win(win), .table_s(table_s), .word(tbc_word), .len(tbc_len));
  zr_dec   u_zr   (.win(win), .word(zr_word), .len(zr_len));
  diff_dec u_diff (.win(win), .base(base_q), .word(diff_word), .len(diff_len));

  always_comb begin
    unique case (cur_scheme)
      SCH_TABLE: begin out_data = tbc_word;  need = tbc_len;  end
      SCH_DIFF:  begin out_data = diff_word; need = diff_len; end
      SCH_ZERO:  begin out_data = zr_word;   need = zr_len;   end
      default:   begin out_data = win[CODE_MAX-1 -: WORD_W]; need = len_t'(WORD_W); end
    endcase
  end

  logic in_fire, out_fire;

  assign busy      = active_q;
  assign in_ready  = active_q && (cnt_q <= CNT_W'(BUF_W - WORD_W));
  assign out_valid = active_q && (cnt_q >= CNT_W'(need));
  assign out_idx   = idx_q;
  assign out_last  = (idx_q == OIDX_W'(BLOCK_WORDS - 1));
  assign in_fire   = in_valid && in_ready;
  assign out_fire  = out_valid && out_ready;

  logic [BUF_W-1:0] buf_d;
  logic [CNT_W-1:0] cnt_d;

  always_comb begin
    buf_d = buf_q;
    cnt_d = cnt_q;
    if (out_fire) begin
      buf_d = buf_d << need;
      cnt_d = cnt_d - CNT_W'(need);
    end
    if (in_fire) begin
      buf_d = buf_d | ((BUF_W)'(in_data) << (CNT_W'(BUF_W - WORD_W) - cnt_d));
      cnt_d = cnt_d + CNT_W'(WORD_W);
    end
    if (start || (out_fire && out_last)) begin
      buf_d = '0;
      cnt_d = '0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buf_q    <= '0;
      cnt_q    <= '0;
      active_q <= 1'b0;
      idx_q    <= '0;
      base_q   <= '0;
    end else begin
      buf_q <= buf_d;
      cnt_q <= cnt_d;
      if (start) begin
        active_q <= 1'b1;
        idx_q    <= '0;
        base_q   <= '0;
      end else if (out_fire) begin
        if (cur_scheme == SCH_DIFF) base_q <= diff_word;
        if (out_last) active_q <= 1'b0;
        idx_q <= idx_q + 1'b1;
      end
    end
  end

  a_rule: assert property (@(posedge clk) disable iff (!rst_n) !(start && active_q))
    else $error("ocda_dc: start while busy");

endmodule
