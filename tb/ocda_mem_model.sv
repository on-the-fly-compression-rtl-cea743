// ocda_mem_model -- behavioural model of the bus interface and main memory
// seen by the accelerator (not synthesizable; testbench use only).
//
// Write port: accepts one word per cycle when bw_ready, which is random when
// RANDOM is set. Read port: accepts one burst request {byte address, word
// count} at a time, then returns the words in order on br_*, with random gaps
// when RANDOM is set, honouring br_ready. Memory covers 2**DEPTH_W words from
// byte address BASE; bad counts accesses outside it.
module ocda_mem_model
  import ocda_pkg::*;
#(
  parameter logic [31:0] BASE    = 32'h0010_0000,
  parameter int          DEPTH_W = 16,
  parameter int          LEN_W   = 5,
  parameter bit          RANDOM  = 1'b1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             bw_valid,
  output logic             bw_ready,
  input  logic [31:0]      bw_addr,
  input  word_t            bw_data,
  input  logic             br_req_valid,
  output logic             br_req_ready,
  input  logic [31:0]      br_req_addr,
  input  logic [LEN_W-1:0] br_req_len,
  output logic             br_valid,
  input  logic             br_ready,
  output word_t            br_data,
  output int               writes,
  output int               reads,
  output int               bad
);

  word_t mem [1 << DEPTH_W];
  logic  active, gate, req_gate;
  int    ptr, rem;

  function automatic int widx(input logic [31:0] a);
    return int'((a - BASE) >> 2);
  endfunction

  assign br_req_ready = !active && req_gate;
  assign br_valid     = active && gate;
  assign br_data      = mem[ptr[DEPTH_W-1:0]];

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bw_ready <= 1'b0; gate <= 1'b0; req_gate <= 1'b0;
      active <= 1'b0; ptr <= 0; rem <= 0;
      writes <= 0; reads <= 0; bad <= 0;
    end else begin
      bw_ready <= RANDOM ? ($urandom_range(0, 3) != 0) : 1'b1;
      gate     <= RANDOM ? ($urandom_range(0, 4) != 0) : 1'b1;
      req_gate <= RANDOM ? ($urandom_range(0, 1) != 0) : 1'b1;
      if (bw_valid && bw_ready) begin
        if (bw_addr < BASE || widx(bw_addr) >= (1 << DEPTH_W) || bw_addr[1:0] != 0) bad <= bad + 1;
        else mem[widx(bw_addr)] <= bw_data;
        writes <= writes + 1;
      end
      if (br_req_valid && br_req_ready) begin
        if (br_req_addr < BASE || widx(br_req_addr) + int'(br_req_len) > (1 << DEPTH_W) || br_req_len == 0)
          bad <= bad + 1;
        active <= (br_req_len != 0);
        ptr    <= widx(br_req_addr);
        rem    <= int'(br_req_len);
      end
      if (br_valid && br_ready) begin
        reads <= reads + 1;
        ptr   <= ptr + 1;
        rem   <= rem - 1;
        if (rem == 1) active <= 1'b0;
      end
    end
  end

endmodule
