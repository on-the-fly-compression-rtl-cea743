// tb_ocda_dc -- self-checking test of the Decompression Component.
// Builds compressed blocks with the reference coder (scheme per word from a
// random map), packs them into 32-bit words, feeds them with random gaps and
// random output backpressure, and checks every restored word, its index and
// the last flag. A block fed without gaps checks that restored words leave at
// one per cycle once the first bus word is in.
module tb_ocda_dc;
  import ocda_pkg::*;
  import ocda_ref_pkg::*;

  localparam int BW = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  bc_table_t table_s;
  logic start, busy;
  logic in_valid, in_ready;
  word_t in_data;
  scheme_e cur_scheme;
  logic out_valid, out_ready, out_last;
  word_t out_data;
  logic [$clog2(BW)-1:0] out_idx;
  int checks = 0, failures = 0;
  scheme_e smap[BW];
  word_t   orig[BW];
  bit      stall_out = 1'b1;
  int      first_in_t, last_out_t;

  ocda_dc #(.BLOCK_WORDS(BW)) dut (.*);

  always #5 clk = ~clk;
  assign cur_scheme = smap[out_idx];

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Inputs are driven and outputs sampled at the falling edge, half a cycle
  // away from the rising edge on which the design moves.
  always @(posedge clk) out_ready <= stall_out ? ($urandom_range(0, 3) != 0) : 1'b1;

  always @(negedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      checks++;
      if (out_data !== orig[out_idx] || out_last !== (out_idx == BW - 1)) begin
        failures++;
        if (failures < 10) $display("FAIL idx %0d got %h exp %h scheme %s", out_idx, out_data, orig[out_idx], smap[out_idx].name());
      end
      if (out_last) last_out_t = $time;
    end
  end

  task automatic run_block(input bit gaps, input int mode);
    bit q[$];
    word_t base, prev, words[$];
    int nout;
    base = '0; prev = 32'h0000_8000;
    for (int n = 0; n < BW; n++) begin
      smap[n] = (mode < 0) ? scheme_e'($urandom_range(0, 3)) : scheme_e'(mode);
      orig[n] = gen_word(smap[n], prev, table_s);
      prev = orig[n];
      ref_encode(q, orig[n], smap[n], base, table_s);
      if (smap[n] == SCH_DIFF) base = orig[n];
    end
    while (q.size() % 32 != 0) q.push_back(1'($urandom));
    for (int k = 0; k < q.size(); k += 32) begin
      word_t e;
      for (int j = 0; j < 32; j++) e[31 - j] = q[k + j];
      words.push_back(e);
    end
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    for (int k = 0; k < words.size(); k++) begin
      in_valid = 1'b0;
      while (gaps && $urandom_range(0, 2) == 0) @(negedge clk);
      in_valid = 1'b1; in_data = words[k];
      #1;
      while (!in_ready) begin @(negedge clk); #1; end
      @(negedge clk);
    end
    in_valid = 1'b0;
    while (busy) @(negedge clk);
    checks++;
    if (busy) failures++;
  endtask

  initial begin
    in_valid = 0; in_data = 0; start = 0;
    table_s = make_table(9);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    for (int b = 0; b < 300; b++) run_block(b[0], -1);
    for (int s = 0; s < 4; s++) for (int b = 0; b < 20; b++) run_block(1'b1, s);
    // rate: zero-removal block of all-zero words arrives in one bus word;
    // 16 words must then leave in 16 consecutive cycles.
    stall_out = 1'b0;
    @(posedge clk);
    for (int n = 0; n < BW; n++) begin smap[n] = SCH_ZERO; orig[n] = '0; end
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    in_valid = 1'b1; in_data = '0;
    @(negedge clk);
    first_in_t = $time;
    in_valid = 1'b0;
    while (busy) @(negedge clk);
    checks++;
    // first word is out in the cycle after the bus word, then one per cycle
    if ((last_out_t - first_in_t) / 10 != BW - 1) begin
      failures++; $display("FAIL zero block took %0d cycles, expected %0d", (last_out_t - first_in_t) / 10, BW - 1);
    end
    repeat (3) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
