// argon2_compress: the Argon2 compression function G(X, Y) on 1024-byte
// blocks.
//
// The block is held as 128 64-bit words, seen as an 8x8 matrix of 16-byte
// registers: row k is words 16k..16k+15, column k is words 2k, 2k+1,
// 2k+16, 2k+17, ..., 2k+112, 2k+113. G computes R = X ^ Y, applies the
// permutation P to each row (giving Q) and then to each column (giving
// Z), and outputs Z ^ R.
//
// Interface. Operands are loaded one word per cycle into R: ld_valid_i
// with ld_xor_i = 0 writes R[ld_idx_i] = ld_data_i, with ld_xor_i = 1 it
// xors the word in, so X then Y gives R = X ^ Y. clear_i zeroes R. start_i
// runs the 16 permutation steps, one P per cycle (rows 0..7, then columns
// 0..7); done_o pulses when Z is ready, 16 cycles after start_i. rd_idx_i
// selects a word of the result Z ^ R on rd_data_o (combinational).
// chain_i copies the result into R, so that G(0, G(0, Z)) for the
// address blocks is: clear, load Z, start, chain, start. One P per cycle
// and the word-wide load port are choices of this design.
module argon2_compress
  import argon2_pkg::*;
(
  input  logic       clk_i,
  input  logic       rst_ni,
  input  logic       clear_i,
  input  logic       ld_valid_i,
  input  logic       ld_xor_i,
  input  logic [6:0] ld_idx_i,
  input  word_t      ld_data_i,
  input  logic       start_i,
  input  logic       chain_i,
  output logic       busy_o,
  output logic       done_o,
  input  logic [6:0] rd_idx_i,
  output word_t      rd_data_o
);
  word_t      r_q [BLOCK_WORDS];
  word_t      q_q [BLOCK_WORDS];
  logic [3:0] step_q;
  logic       busy_q;

  word_t      p_in  [16];
  word_t      p_out [16];

  // Word index of element n of the row or column handled in step s.
  function automatic logic [6:0] elem(logic [3:0] s, int unsigned n);
    if (!s[3]) return 7'(16 * s[2:0] + n);
    else       return 7'(2 * s[2:0] + (n % 2) + 16 * (n / 2));
  endfunction

  always_comb for (int n = 0; n < 16; n++) p_in[n] = q_q[elem(step_q, n)];

  argon2_perm u_p (.v_i(p_in), .v_o(p_out));

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      busy_q <= 1'b0;
      done_o <= 1'b0;
      step_q <= '0;
      for (int k = 0; k < BLOCK_WORDS; k++) begin r_q[k] <= '0; q_q[k] <= '0; end
    end else begin
      done_o <= 1'b0;
      if (busy_q) begin
        for (int n = 0; n < 16; n++) q_q[elem(step_q, n)] <= p_out[n];
        step_q <= step_q + 4'd1;
        if (step_q == 4'd15) begin
          busy_q <= 1'b0;
          done_o <= 1'b1;
        end
      end else if (start_i) begin
        busy_q <= 1'b1;
        step_q <= '0;
        q_q    <= r_q;
      end else if (chain_i) begin
        for (int k = 0; k < BLOCK_WORDS; k++) r_q[k] <= q_q[k] ^ r_q[k];
      end else if (clear_i) begin
        for (int k = 0; k < BLOCK_WORDS; k++) r_q[k] <= '0;
      end else if (ld_valid_i) begin
        r_q[ld_idx_i] <= ld_xor_i ? (r_q[ld_idx_i] ^ ld_data_i) : ld_data_i;
      end
    end
  end

  assign busy_o    = busy_q;
  assign rd_data_o = q_q[rd_idx_i] ^ r_q[rd_idx_i];

  // Loads, clears and chaining are only allowed while G is idle.
  a_idle_load: assert property (@(posedge clk_i) disable iff (!rst_ni)
                                busy_q |-> !(ld_valid_i || clear_i || chain_i || start_i));
endmodule
