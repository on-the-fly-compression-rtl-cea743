// tb_tbc_dec -- self-checking test of tbc_dec.
// Codes random words with the reference model, places the code at the top of
// the window followed by random bits of the next code, and checks that the
// decoder restores the word and consumes exactly the code length.
module tb_tbc_dec;
  import ocda_pkg::*;
  import ocda_ref_pkg::*;

  logic      clk = 1'b0;
  word_t     b, dw;
  bc_table_t t;
  code_t     win;
  len_t      dlen;
  int        checks = 0, failures = 0;

  tbc_dec dut (.win(win), .table_s(t), .word(dw), .len(dlen));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(input word_t word, input word_t base);
    bit q[$];
    ref_encode(q, word, SCH_TABLE, base, t);
    win = '0;
    for (int k = 0; k < int'(CODE_MAX); k++)
      win[CODE_MAX-1-k] = (k < q.size()) ? q[k] : 1'($urandom);
    b = base;
    #1;
    checks++;
    if (dw != word || int'(dlen) != q.size()) begin
      failures++;
      if (failures < 10) $display("FAIL word=%h base=%h got=%h len=%0d exp_len=%0d", word, base, dw, dlen, q.size());
    end
  endtask

  initial begin
    word_t prev;
    t = make_table(11);
    prev = 32'h0001_0000;
    check_one('0, '0);
    check_one('1, '0);
    check_one(32'h8000_0001, 32'h0000_0001);
    check_one({t[1], 8'h00, t[14], t[0]}, '0);
    for (int n = 0; n < 4000; n++) begin
      word_t nw;
      nw = gen_word(SCH_TABLE, prev, t);
      if (n % 7 == 0) nw = $urandom;
      check_one(nw, prev);
      prev = nw;
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
