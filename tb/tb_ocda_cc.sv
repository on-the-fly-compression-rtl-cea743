// tb_ocda_cc -- self-checking test of the Compression Component.
// Streams blocks whose words carry randomly mixed schemes, with random input
// gaps and random output backpressure. The expected output is the reference
// codes of the block concatenated and cut into 32-bit words, the last padded
// with zeros; the expected CCL is the total code length. A final block of
// raw words with no backpressure checks the one-word-per-cycle rate.
module tb_ocda_cc;
  import ocda_pkg::*;
  import ocda_ref_pkg::*;

  localparam int BW = 16;
  localparam int CCL_W = $clog2(BW * CODE_MAX + 1);
  localparam int IDX_W = $clog2((BW * CODE_MAX + 31) / 32 + 1);

  logic clk = 1'b0, rst_n = 1'b0;
  bc_table_t table_s;
  logic in_valid, in_ready, in_first, in_last;
  word_t in_data;
  scheme_e in_scheme;
  logic out_valid, out_ready, out_last, ccl_valid;
  word_t out_data;
  logic [IDX_W-1:0] out_idx;
  logic [CCL_W-1:0] ccl_bits;
  int checks = 0, failures = 0;
  bit stall_out = 1'b1;

  ocda_cc #(.BLOCK_WORDS(BW)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected output words and CCLs
  word_t exp_q[$];
  int    exp_last_q[$];
  int    exp_ccl_q[$];
  int    got_words = 0;

  // Inputs are driven and outputs sampled at the falling edge, half a cycle
  // away from the rising edge on which the design moves.
  always @(posedge clk) out_ready <= stall_out ? ($urandom_range(0, 3) != 0) : 1'b1;

  always @(negedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++; $display("FAIL unexpected output word %h", out_data);
      end else begin
        word_t e; int el;
        e = exp_q.pop_front(); el = exp_last_q.pop_front();
        if (out_data !== e || out_last !== el[0] || int'(out_idx) != got_words) begin
          failures++;
          if (failures < 10) $display("FAIL out %h exp %h last %b/%0d idx %0d/%0d", out_data, e, out_last, el, out_idx, got_words);
        end
      end
      got_words = out_last ? 0 : got_words + 1;
      if (out_last) begin
        checks++;
        if (!ccl_valid || int'(ccl_bits) != exp_ccl_q[0]) begin
          failures++; $display("FAIL ccl %0d exp %0d valid %b", ccl_bits, exp_ccl_q[0], ccl_valid);
        end
        void'(exp_ccl_q.pop_front());
      end
    end
  end

  task automatic send_block(input bit mixed, input bit [1:0] fixed, input bit gaps);
    bit q[$];
    word_t base, prev;
    word_t   w[BW];
    scheme_e s[BW];
    base = '0; prev = 32'h0000_2000;
    for (int n = 0; n < BW; n++) begin
      s[n] = mixed ? scheme_e'($urandom_range(0, 3)) : scheme_e'(fixed);
      w[n] = gen_word(s[n], prev, table_s);
      ref_encode(q, w[n], s[n], base, table_s);
      if (s[n] == SCH_DIFF) base = w[n];
      prev = w[n];
    end
    exp_ccl_q.push_back(q.size());
    while (q.size() % 32 != 0) q.push_back(1'b0);
    for (int k = 0; k < q.size(); k += 32) begin
      word_t e;
      for (int j = 0; j < 32; j++) e[31 - j] = q[k + j];
      exp_q.push_back(e);
      exp_last_q.push_back(k + 32 == q.size());
    end
    for (int n = 0; n < BW; n++) begin
      @(negedge clk);
      in_valid = 1'b0;
      while (gaps && $urandom_range(0, 3) == 0) @(negedge clk);
      in_valid = 1'b1; in_data = w[n]; in_scheme = s[n];
      in_first = (n == 0); in_last = (n == BW - 1);
      #1;
      while (!in_ready) begin @(negedge clk); #1; end
      @(posedge clk);
    end
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  initial begin
    int t0;
    in_valid = 0; in_data = 0; in_scheme = SCH_NONE; in_first = 0; in_last = 0;
    table_s = make_table(5);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    for (int b = 0; b < 300; b++) send_block(1'b1, 2'd0, b[0]);
    for (int s = 0; s < 4; s++) for (int b = 0; b < 20; b++) send_block(1'b0, 2'(s), 1'b1);
    while (exp_q.size() != 0) @(posedge clk);
    // rate: 16 raw words in, no backpressure, one per cycle
    stall_out = 1'b0;
    repeat (4) @(posedge clk);
    t0 = $time;
    send_block(1'b0, 2'd0, 1'b0);
    checks++;
    if (($time - t0) / 10 != BW) begin
      failures++; $display("FAIL raw block took %0d cycles, expected %0d", ($time - t0) / 10, BW);
    end
    while (exp_q.size() != 0) @(posedge clk);
    repeat (5) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
