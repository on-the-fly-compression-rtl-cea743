// tb_ocda_cat -- self-checking test of the Compressed Address Table.
// Programs a region map like a JOP image layout and checks scheme lookups on
// both ports against a reference search; allocates blocks with random code
// lengths and checks the recorded compressed address and word count, the
// write address of each packed word, the one-cycle lookup, misses for blocks never stored, re-allocation of a block,
// and space_ok as the small compressed area fills up.
module tb_ocda_cat;
  import ocda_pkg::*;

  localparam int UA = 10, CA = 8, BW = 16, NR = 8;
  localparam int BLK_W = UA - 4;
  localparam int CCL_W = $clog2(BW * CODE_MAX + 1);
  localparam int MAX_CW = (BW * CODE_MAX + 31) / 32;

  logic clk = 1'b0, rst_n = 1'b0;
  logic reg_we;
  logic [2:0] reg_idx;
  logic [UA-1:0] reg_start, a_addr, b_addr;
  scheme_e reg_scheme, a_scheme, b_scheme;
  logic alloc_valid;
  logic [BLK_W-1:0] alloc_block, lk_block;
  logic [CCL_W-1:0] alloc_bits;
  logic [CA-1:0] next_free, lk_caddr;
  logic space_ok, lk_valid, lk_rsp_valid, lk_hit;
  logic [$clog2(MAX_CW+1)-1:0] lk_cwords, wr_idx;
  logic [CA-1:0] wr_caddr;
  int checks = 0, failures = 0;

  ocda_cat #(.UADDR_W(UA), .CADDR_W(CA), .BLOCK_WORDS(BW), .NUM_REGIONS(NR)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", msg); end
  endtask

  int      rstart[NR];
  scheme_e rsch[NR];
  int      ent_addr[1 << BLK_W], ent_words[1 << BLK_W];
  bit      ent_valid[1 << BLK_W];

  function automatic scheme_e ref_scheme(input int a);
    scheme_e s = rsch[0];
    for (int k = 0; k < NR; k++) if (a >= rstart[k]) s = rsch[k];
    return s;
  endfunction

  initial begin
    int nf;
    reg_we = 0; reg_idx = 0; reg_start = 0; reg_scheme = SCH_NONE;
    a_addr = 0; b_addr = 0; alloc_valid = 0; alloc_block = 0; alloc_bits = 0;
    lk_valid = 0; lk_block = 0; wr_idx = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // header, bytecode, special pointer, string table, static fields,
    // class information, method table, constant pool
    rstart = '{0, 1, 300, 304, 400, 450, 520, 900};
    rsch   = '{SCH_NONE, SCH_TABLE, SCH_DIFF, SCH_NONE, SCH_ZERO, SCH_ZERO, SCH_DIFF, SCH_NONE};
    for (int k = 0; k < NR; k++) begin
      @(negedge clk);
      reg_we = 1; reg_idx = 3'(k); reg_start = UA'(rstart[k]); reg_scheme = rsch[k];
    end
    @(negedge clk);
    reg_we = 0;
    for (int n = 0; n < 600; n++) begin
      a_addr = UA'($urandom); b_addr = (n < 8) ? UA'(rstart[n]) : UA'($urandom);
      #1;
      chk(a_scheme == ref_scheme(int'(a_addr)) && b_scheme == ref_scheme(int'(b_addr)),
          $sformatf("scheme lookup a=%0d b=%0d", a_addr, b_addr));
    end
    // allocation
    nf = 0;
    for (int b = 0; b < (1 << BLK_W); b++) ent_valid[b] = 0;
    for (int n = 0; n < 40; n++) begin
      int blk, bits, w;
      blk = (n < 36) ? n : n - 30;   // the last four rewrite blocks 6..9
      bits = $urandom_range(16, BW * CODE_MAX);
      w = (bits + 31) / 32;
      @(negedge clk);
      chk(int'(next_free) == nf, $sformatf("next_free %0d exp %0d", next_free, nf));
      wr_idx = 5'($urandom_range(0, MAX_CW - 1));
      #1;
      chk(int'(wr_caddr) == (nf + int'(wr_idx)) % (1 << CA), $sformatf("wr_caddr %0d at %0d+%0d", wr_caddr, nf, wr_idx));
      chk(space_ok == (nf + MAX_CW < (1 << CA)), $sformatf("space_ok %b at %0d", space_ok, nf));
      if (!space_ok) break;
      alloc_valid = 1; alloc_block = BLK_W'(blk); alloc_bits = CCL_W'(bits);
      ent_valid[blk] = 1; ent_addr[blk] = nf; ent_words[blk] = w;
      nf += w;
      @(negedge clk);
      alloc_valid = 0;
    end
    @(negedge clk);
    chk(space_ok == (nf + MAX_CW < (1 << CA)), "space_ok at end");
    chk(!space_ok, "area should be nearly full");
    for (int b = 0; b < 48; b++) begin
      @(negedge clk);
      lk_valid = 1; lk_block = BLK_W'(b);
      @(negedge clk);
      lk_valid = 0;
      chk(lk_rsp_valid && lk_hit == ent_valid[b], $sformatf("hit blk %0d: %b", b, lk_hit));
      if (ent_valid[b])
        chk(int'(lk_caddr) == ent_addr[b] && int'(lk_cwords) == ent_words[b],
            $sformatf("entry blk %0d: %0d/%0d exp %0d/%0d", b, lk_caddr, lk_cwords, ent_addr[b], ent_words[b]));
    end
    @(negedge clk);
    chk(!lk_rsp_valid, "response lasts one cycle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
