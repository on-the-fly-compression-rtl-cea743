// tb_ocda_full -- the accelerator at its default size (64K-word image,
// 64K-word compressed area, 16-word blocks) running three JOP images whose
// area sizes are those of the Sieve, Kfl and UDP/IP benchmark programs.
//
// For each image: reset, choose the set S from the bytecode statistics,
// program the region map, store the whole image, check the number of bus
// words against the reference coder, load the whole image back and compare.
// The bus and memory model answer without stalls so that the cycle counts
// show the accelerator's own rate. The contents are synthetic (the real
// binaries are not available), so the compression ratios printed per area
// describe this data, not the benchmarks.
module tb_ocda_full;
  import ocda_pkg::*;
  import ocda_ref_pkg::*;

  localparam int UA = 16, BW = 16, NR = 8;
  localparam logic [31:0] BASE = 32'h0010_0000;
  localparam int MAX_CW = (BW * CODE_MAX + 31) / 32;
  localparam int CW_W = $clog2(MAX_CW + 1);
  localparam int MAXW = 1 << UA;

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

  ocda_top dut (.*);
  ocda_mem_model #(.BASE(BASE), .DEPTH_W(16), .LEN_W(CW_W), .RANDOM(1'b0)) mem (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL %s", msg); end
  endtask

  initial begin : watchdog
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  word_t     img [MAXW];
  scheme_e   sch [MAXW];
  bc_table_t tS;
  int        rstart [NR];
  scheme_e   rsch [NR] = '{SCH_NONE, SCH_TABLE, SCH_DIFF, SCH_NONE, SCH_ZERO, SCH_ZERO, SCH_DIFF, SCH_NONE};
  int        nwords, nblk;
  int        area_bits_in [NR], area_bits_out [NR];
  int        ld_got, ld_bad;

  assign ld_ready = 1'b1;

  always @(negedge clk) if (rst_n && ld_valid && ld_ready) begin
    ld_got++;
    if (ld_data !== img[ld_addr]) begin
      ld_bad++;
      if (ld_bad < 10) $display("FAIL load addr %0d got %h exp %h", ld_addr, ld_data, img[ld_addr]);
    end
  end

  // asize: header, bytecode, special pointers, string table, static fields,
  // class information, method table, constant pool (words)
  function automatic void build_image(input int asize [NR], input int seed);
    int a, cnt[256];
    word_t prev;
    void'($urandom(seed));
    a = 0;
    for (int r = 0; r < NR; r++) begin rstart[r] = a; a += asize[r]; end
    nwords = ((a + BW - 1) / BW) * BW;
    nblk   = nwords / BW;
    tS = make_table(seed);
    prev = 32'h0000_0400;
    for (int r = 0; r < NR; r++)
      for (int k = rstart[r]; k < rstart[r] + asize[r]; k++) begin
        sch[k] = rsch[r];
        if (r == 6) // method table: two words per method, start address then sizes
          img[k] = ((k - rstart[r]) % 2 == 0) ? 32'h0000_0400 + 32'((k - rstart[r]) * 9) + 32'($urandom_range(0, 7))
                                               : 32'($urandom_range(0, 255));
        else
          img[k] = gen_word(rsch[r], prev, tS);
        prev = img[k];
      end
    for (int k = a; k < nwords; k++) begin sch[k] = SCH_NONE; img[k] = '0; end
    img[0] = 32'(rstart[2]);
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

  function automatic int area_of(input int k);
    int r = 0;
    for (int i = 0; i < NR; i++) if (k >= rstart[i]) r = i;
    return r;
  endfunction

  function automatic int ref_total_words();
    int total;
    total = 0;
    for (int r = 0; r < NR; r++) begin area_bits_in[r] = 0; area_bits_out[r] = 0; end
    for (int b = 0; b < nblk; b++) begin
      bit q[$];
      word_t base;
      int nb0;
      base = '0;
      for (int k = b * BW; k < (b + 1) * BW; k++) begin
        nb0 = q.size();
        ref_encode(q, img[k], sch[k], base, tS);
        area_bits_in[area_of(k)]  += 32;
        area_bits_out[area_of(k)] += q.size() - nb0;
        if (sch[k] == SCH_DIFF) base = img[k];
      end
      total += (q.size() + 31) / 32;
    end
    return total;
  endfunction

  task automatic run_workload(input string name, input int asize [NR], input int seed);
    int exp_words, t0, t_store, t_load;
    string area_name [NR] = '{"header", "bytecode", "special pointer", "string table",
                              "static fields", "class information", "method table", "constant pool"};
    rst_n = 1'b0;
    ld_got = 0; ld_bad = 0;
    build_image(asize, seed);
    exp_words = ref_total_words();
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int e = 0; e < 16; e++) begin
      @(negedge clk); tbl_we = 1; tbl_idx = 4'(e); tbl_val = tS[e];
    end
    for (int r = 0; r < NR; r++) begin
      @(negedge clk); tbl_we = 0; rgn_we = 1; rgn_idx = 3'(r); rgn_start = UA'(rstart[r]); rgn_scheme = rsch[r];
    end
    @(negedge clk); rgn_we = 0;
    // store the image
    t0 = $time;
    for (int k = 0; k < nwords; k++) begin
      st_valid = 1'b1; st_addr = UA'(k); st_data = img[k];
      #1;
      while (!st_ready) begin @(negedge clk); #1; end
      @(negedge clk);
    end
    st_valid = 1'b0;
    repeat (2 * MAX_CW + 4) @(negedge clk);
    t_store = ($time - t0) / 10;
    chk(writes == exp_words, $sformatf("%s: bus words %0d, reference %0d", name, writes, exp_words));
    chk(!overflow && bad == 0, $sformatf("%s: overflow %b, bad accesses %0d", name, overflow, bad));
    // load it back
    t0 = $time;
    for (int b = 0; b < nblk; b++) begin
      int g0;
      g0 = ld_got;
      ld_req_valid = 1'b1; ld_req_addr = UA'(b * BW);
      #1;
      while (!ld_req_ready) begin @(negedge clk); #1; end
      @(negedge clk);
      ld_req_valid = 1'b0;
      while (ld_got - g0 < BW && !ld_err) @(negedge clk);
      chk(ld_got - g0 == BW, $sformatf("%s: block %0d loaded", name, b));
    end
    t_load = ($time - t0) / 10;
    chk(ld_got == nwords && ld_bad == 0, $sformatf("%s: %0d of %0d words loaded, %0d wrong", name, ld_got, nwords, ld_bad));
    $display("%s: %0d words (%0d bits) stored as %0d words (%0d bits), %0d%% smaller",
             name, nwords, 32 * nwords, writes, 32 * writes, 100 - 100 * writes / nwords);
    for (int r = 0; r < NR; r++)
      $display("  %-18s %7d bits -> %7d bits", area_name[r], area_bits_in[r], area_bits_out[r]);
    $display("  store %0d cycles, load %0d cycles (%0d.%02d cycles per word)",
             t_store, t_load, t_load / nwords, (100 * t_load / nwords) % 100);
  endtask

  initial begin
    tbl_we = 0; tbl_idx = 0; tbl_val = 0; rgn_we = 0; rgn_idx = 0; rgn_start = 0; rgn_scheme = SCH_NONE;
    st_valid = 0; st_addr = 0; st_data = 0; ld_req_valid = 0; ld_req_addr = 0;
    // Bytecode, special pointer, class information + static field and method
    // table sizes are the published pre-compression sizes (bits / 32;
    // the class area split 1:3 between static fields and class information).
    // String table and constant pool sizes are not published; 128 and 256
    // words are assumed.
    run_workload("Sieve",  '{1, 2843, 4, 128, 100, 301, 4320, 256}, 1);
    run_workload("Kfl",    '{1, 1942, 4, 128,  68, 202, 2592, 256}, 2);
    run_workload("UDP/IP", '{1, 2232, 4, 128,  87, 261, 3104, 256}, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
