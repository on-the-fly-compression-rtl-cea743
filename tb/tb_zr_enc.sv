// tb_zr_enc -- self-checking test of zr_enc.
// Drives random words typical of the scheme's image area plus corner cases,
// and compares code and length with the bit-serial reference model.
module tb_zr_enc;
  import ocda_pkg::*;
  import ocda_ref_pkg::*;

  logic      clk = 1'b0;
  word_t     w, b;
  bc_table_t t;
  code_t     code;
  len_t      len;
  int        checks = 0, failures = 0, cycles = 0;

  zr_enc dut (.word(w), .code(code), .len(len));

  always #5 clk = ~clk;
  always @(posedge clk) cycles <= cycles + 1;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(input word_t word, input word_t base);
    bit q[$];
    code_t exp;
    w = word; b = base;
    #1;
    ref_encode(q, word, SCH_ZERO, base, t);
    exp = '0;
    foreach (q[k]) exp = (exp << 1) | code_t'(q[k]);
    checks++;
    if (int'(len) != q.size() || code != exp) begin
      failures++;
      if (failures < 10) $display("FAIL word=%h base=%h len=%0d exp_len=%0d code=%h exp=%h", word, base, len, q.size(), code, exp);
    end
  endtask

  initial begin
    word_t prev;
    t = make_table(3);
    prev = 32'h0000_4000;
    check_one('0, '0);
    check_one('1, '0);
    check_one(32'h8000_0000, '0);
    check_one(32'h1234_5678, 32'h1234_5678);
    check_one({t[0], t[15], 8'h01, t[7]}, 32'h1);
    for (int n = 0; n < 4000; n++) begin
      word_t nw;
      nw = gen_word(SCH_ZERO, prev, t);
      if (n % 7 == 0) nw = $urandom;
      check_one(nw, prev);
      prev = nw;
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
