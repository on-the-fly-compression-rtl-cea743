// tb_ocda_top -- end-to-end test of the accelerator at reduced size
// (1024-word image, 1024-word compressed area).
//
// Builds a synthetic JOP image with the eight areas of the file format,
// picks the 16 most frequent bytecodes as the set S, programs the region map,
// then:
//   1. loads a block that was never stored (expects ld_err),
//   2. stores every block and checks the bus word count against the
//      reference code lengths,
//   3. loads every block in random order and compares with the image,
//   4. stores and loads different blocks at the same time,
//   5. keeps re-storing blocks until the compressed area overflows, checks
//      that further stores are dropped, and reloads everything.
// Bus, memory and the processor side all insert random stalls. Every
// mechanism is counted and a failure is counted for any that never happened.
module tb_ocda_top;
  import ocda_pkg::*;
  import ocda_ref_pkg::*;

  localparam int UA = 10, CA = 10, BW = 16, NR = 8;
  localparam logic [31:0] BASE = 32'h0010_0000;
  localparam int NWORDS = 1 << UA, NBLK = NWORDS / BW;
  localparam int MAX_CW = (BW * CODE_MAX + 31) / 32;
  localparam int CW_W = $clog2(MAX_CW + 1);

  logic clk = 1'b0, rst_n = 1'b0;
  logic tbl_we; logic [3:0] tbl_idx; logic [7:0] tbl_val;
  logic rgn_we; logic [2:0] rgn_idx; logic [UA-1:0] rgn_start; scheme_e rgn_scheme;
  logic st_valid, st_ready; logic [UA-1:0] st_addr; word_t st_data;
  logic ld_req_valid, ld_req_ready, ld_err, ld_valid, ld_ready, ld_last;
  logic [UA-1:0] ld_req_addr, ld_addr; word_t ld_data;
  logic bw_valid, bw_ready; logic [31:0] bw_addr; word_t bw_data;
  logic br_req_valid, br_req_ready; logic [31:0] br_req_addr; logic [CW_W-1:0] br_req_len;
  logic br_valid, br_ready; word_t br_data;
  logic overflow;
  int writes, reads, bad;

  ocda_top #(.UADDR_W(UA), .CADDR_W(CA), .BLOCK_WORDS(BW), .NUM_REGIONS(NR), .CMP_BASE(BASE)) dut (.*);
  ocda_mem_model #(.BASE(BASE), .DEPTH_W(CA), .LEN_W(CW_W), .RANDOM(1'b1)) mem (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL %s", msg); end
  endtask

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- image ----------------
  word_t     img [NWORDS];
  scheme_e   sch [NWORDS];
  bc_table_t tS;
  int        rstart [NR];
  scheme_e   rsch [NR];
  // area sizes in words: header, bytecode, special pointers, string table,
  // static fields, class information, method table, constant pool
  int        asize [NR] = '{1, 420, 4, 60, 90, 110, 240, 99};

  // ---------------- mechanism counters ----------------
  int n_tbl_hit, n_tbl_miss, n_zero, n_nonzero, n_diff, n_raw;
  int n_st_stall, n_bw_stall, n_br_gap, n_ld_stall, n_ld_err, n_dropped, n_overflow, n_concurrent;
  int ld_got, ld_bad;

  always @(posedge clk) ld_ready <= ($urandom_range(0, 4) != 0);

  always @(negedge clk) if (rst_n) begin
    if (bw_valid && !bw_ready) n_bw_stall++;
    if (br_ready && !br_valid) n_br_gap++;
    if (ld_valid && !ld_ready) n_ld_stall++;
    if (ld_err) n_ld_err++;
    if (st_valid && ld_valid) n_concurrent++;
    if (ld_valid && ld_ready) begin
      ld_got++;
      if (ld_data !== img[ld_addr]) begin
        ld_bad++;
        if (ld_bad < 10) $display("FAIL load addr %0d got %h exp %h (%s)", ld_addr, ld_data, img[ld_addr], sch[ld_addr].name());
      end
    end
  end

  function automatic void build_image();
    int a, cnt[256];
    word_t prev;
    a = 0;
    for (int r = 0; r < NR; r++) begin
      rstart[r] = a;
      a += asize[r];
    end
    rsch = '{SCH_NONE, SCH_TABLE, SCH_DIFF, SCH_NONE, SCH_ZERO, SCH_ZERO, SCH_DIFF, SCH_NONE};
    // bytecodes drawn from a skewed distribution over a small hot set
    tS = make_table(17);
    prev = 32'h0000_0400;
    for (int r = 0; r < NR; r++)
      for (int k = rstart[r]; k < rstart[r] + asize[r] && k < NWORDS; k++) begin
        sch[k] = rsch[r];
        img[k] = gen_word(rsch[r], prev, tS);
        prev   = img[k];
      end
    img[0] = 32'(rstart[2]);   // header: address of the special pointers
    // choose S as the 16 most frequent bytecodes actually present
    for (int v = 0; v < 256; v++) cnt[v] = 0;
    for (int k = rstart[1]; k < rstart[1] + asize[1]; k++)
      for (int j = 0; j < 4; j++) cnt[img[k][31 - 8*j -: 8]]++;
    for (int e = 0; e < 16; e++) begin
      int best;
      best = 0;
      for (int v = 1; v < 256; v++) if (cnt[v] > cnt[best]) best = v;
      tS[e] = 8'(best);
      cnt[best] = -1;
    end
  endfunction

  // reference length of block b in words, and mechanism counts
  function automatic int ref_block_words(input int b, input bit count);
    bit q[$];
    word_t base;
    base = '0;
    for (int k = b * BW; k < (b + 1) * BW; k++) begin
      ref_encode(q, img[k], sch[k], base, tS);
      if (count) begin
        case (sch[k])
          SCH_TABLE: for (int j = 0; j < 4; j++) begin
                       bit h = 0;
                       for (int e = 0; e < 16; e++) if (tS[e] == img[k][31 - 8*j -: 8]) h = 1;
                       if (h) n_tbl_hit++; else n_tbl_miss++;
                     end
          SCH_ZERO:  if (img[k] == 0) n_zero++; else n_nonzero++;
          SCH_DIFF:  n_diff++;
          default:   n_raw++;
        endcase
      end
      if (sch[k] == SCH_DIFF) base = img[k];
    end
    return (q.size() + 31) / 32;
  endfunction

  // ---------------- drivers ----------------
  task automatic store_block(input int b, input bit gaps);
    for (int n = 0; n < BW; n++) begin
      @(negedge clk);
      st_valid = 1'b0;
      while (gaps && $urandom_range(0, 3) == 0) @(negedge clk);
      st_valid = 1'b1; st_addr = UA'(b * BW + n); st_data = img[b * BW + n];
      #1;
      while (!st_ready) begin n_st_stall++; @(negedge clk); #1; end
      @(posedge clk);
    end
    @(negedge clk);
    st_valid = 1'b0;
  endtask

  // returns 1 when the block came back, 0 on ld_err
  task automatic load_block(input int b, output bit ok);
    int got0, err0;
    got0 = ld_got; err0 = n_ld_err;
    @(negedge clk);
    ld_req_valid = 1'b1; ld_req_addr = UA'(b * BW);
    #1;
    while (!ld_req_ready) begin @(negedge clk); #1; end
    @(posedge clk);
    @(negedge clk);
    ld_req_valid = 1'b0;
    while (ld_got - got0 < BW && n_ld_err == err0) @(negedge clk);
    ok = (n_ld_err == err0);
  endtask

  task automatic wait_store_drained();
    // the last packed words of a block leave a few cycles after its last word
    repeat (2 * MAX_CW + 4) @(negedge clk);
    while (bw_valid) @(negedge clk);
  endtask

  initial begin
    int exp_words, order[NBLK], w0;
    bit ok;
    tbl_we = 0; tbl_idx = 0; tbl_val = 0; rgn_we = 0; rgn_idx = 0; rgn_start = 0; rgn_scheme = SCH_NONE;
    st_valid = 0; st_addr = 0; st_data = 0; ld_req_valid = 0; ld_req_addr = 0;
    build_image();
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int e = 0; e < 16; e++) begin
      @(negedge clk); tbl_we = 1; tbl_idx = 4'(e); tbl_val = tS[e];
    end
    for (int r = 0; r < NR; r++) begin
      @(negedge clk); tbl_we = 0; rgn_we = 1; rgn_idx = 3'(r); rgn_start = UA'(rstart[r]); rgn_scheme = rsch[r];
    end
    @(negedge clk); rgn_we = 0;

    // 1. block never stored
    load_block(3, ok);
    chk(!ok, "load of a never-stored block must report ld_err");

    // 2. store everything
    exp_words = 0;
    for (int b = 0; b < NBLK; b++) exp_words += ref_block_words(b, 1'b1);
    for (int b = 0; b < NBLK; b++) store_block(b, b[0]);
    wait_store_drained();
    chk(writes == exp_words, $sformatf("bus words written %0d, reference %0d", writes, exp_words));
    chk(!overflow, "no overflow after first store");
    $display("image %0d words stored in %0d words (%0d%%)", NWORDS, writes, 100 * writes / NWORDS);

    // 3. load everything, random order
    for (int b = 0; b < NBLK; b++) order[b] = b;
    order.shuffle();
    for (int b = 0; b < NBLK; b++) begin
      load_block(order[b], ok);
      chk(ok, $sformatf("load block %0d", order[b]));
    end
    chk(ld_got == NWORDS, $sformatf("words loaded %0d", ld_got));

    // 4. store blocks 0..7 again while loading blocks 40..47
    fork
      for (int b = 0; b < 8; b++) store_block(b, 1'b1);
      for (int b = 40; b < 48; b++) begin load_block(b, ok); chk(ok, "concurrent load"); end
    join
    wait_store_drained();

    // 5. fill the compressed area until it overflows
    w0 = writes;
    for (int n = 0; n < 2 * NBLK && !overflow; n++) store_block(n % NBLK, 1'b0);
    wait_store_drained();
    chk(overflow, "overflow flag set");
    if (overflow) n_overflow++;
    w0 = writes;
    for (int b = 10; b < 14; b++) store_block(b, 1'b0);
    wait_store_drained();
    n_dropped = 4 - (writes - w0 > 0 ? 1 : 0) * 4;
    chk(writes == w0, "stores after overflow write nothing");
    for (int b = 0; b < NBLK; b++) begin
      load_block(b, ok);
      chk(ok, $sformatf("reload block %0d after overflow", b));
    end
    chk(ld_bad == 0, $sformatf("%0d loaded words wrong", ld_bad));
    chk(bad == 0, $sformatf("%0d bus accesses outside memory", bad));

    $display("mechanisms: S hit %0d, S miss %0d, zero word %0d, nonzero word %0d, diff %0d, raw %0d",
             n_tbl_hit, n_tbl_miss, n_zero, n_nonzero, n_diff, n_raw);
    $display("            store stall %0d, bus write stall %0d, bus read gap %0d, load stall %0d",
             n_st_stall, n_bw_stall, n_br_gap, n_ld_stall);
    $display("            ld_err %0d, overflow %0d, dropped blocks %0d, concurrent cycles %0d",
             n_ld_err, n_overflow, n_dropped, n_concurrent);
    chk(n_tbl_hit > 0 && n_tbl_miss > 0, "table hit and miss both seen");
    chk(n_zero > 0 && n_nonzero > 0, "zero and non-zero words both seen");
    chk(n_diff > 0 && n_raw > 0, "difference and raw words seen");
    chk(n_st_stall > 0, "store stall seen");
    chk(n_bw_stall > 0, "bus write backpressure seen");
    chk(n_br_gap > 0, "bus read gap seen");
    chk(n_ld_stall > 0, "load backpressure seen");
    chk(n_ld_err == 1, "exactly one ld_err");
    chk(n_overflow > 0 && n_dropped > 0, "overflow and dropped stores seen");
    chk(n_concurrent > 0, "store and load overlapped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
