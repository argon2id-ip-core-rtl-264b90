// argon2_mem: the memory matrix B of the Argon2id core.
//
// Holds MAX_BLOCKS blocks of 1024 bytes, each stored as 128 consecutive
// 64-bit words; the controller maps block (lane l, column j) to block
// number l*q + j, so word w of it sits at address (l*q + j)*128 + w.
// Simple dual port: one write port and one read port, both synchronous.
// A read issued with re_i returns its word on rdata_o in the next cycle.
// A read and a write to the same address in one cycle return the old word.
// The 64-bit word width and the single read port are choices of this
// design; the description gives only the block size and the matrix shape.
// The default MAX_BLOCKS = 32 is the memory size m = 32 KiB of the
// description's simulated example.
module argon2_mem
  import argon2_pkg::*;
#(
  parameter int unsigned MAX_BLOCKS = 32,
  localparam int unsigned DEPTH = MAX_BLOCKS * BLOCK_WORDS,
  localparam int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk_i,
  input  logic          we_i,
  input  logic [AW-1:0] waddr_i,
  input  word_t         wdata_i,
  input  logic          re_i,
  input  logic [AW-1:0] raddr_i,
  output word_t         rdata_o
);
  word_t mem_q [DEPTH];

  always_ff @(posedge clk_i) begin
    if (we_i) mem_q[waddr_i] <= wdata_i;
    if (re_i) rdata_o <= mem_q[raddr_i];
  end
endmodule
