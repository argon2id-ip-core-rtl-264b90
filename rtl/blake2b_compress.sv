// blake2b_compress: the BLAKE2b compression function F.
//
// Mixes one 128-byte message block m[0..15] into the chaining value
// h[0..7]. On start_i the local work vector is set up as the BLAKE2b
// description gives it: v[0..7] = h, v[8..15] = IV, v[12] ^= t (low word
// of the byte counter), v[13] ^= t (high word), v[14] inverted when last_i
// marks the final block. It then runs the 12 rounds, one full round
// (column mixes, then diagonal mixes, eight blake2b_mix instances) per
// clock cycle, with the message words picked by the sigma schedule of the
// round. The result h ^ v[0..7] ^ v[8..15] is presented on h_o with a
// one-cycle done_o pulse, 13 cycles after start_i. Inputs are sampled at
// start_i only. One round per cycle is a choice of this design: the
// description gives the function, not a schedule.
module blake2b_compress
  import argon2_pkg::*;
(
  input  logic         clk_i,
  input  logic         rst_ni,
  input  logic         start_i,
  input  word_t        h_i [8],
  input  word_t        m_i [16],
  input  logic [127:0] t_i,
  input  logic         last_i,
  output logic         busy_o,
  output logic         done_o,
  output word_t        h_o [8]
);
  word_t      v_q [16];
  word_t      v_d [16];
  word_t      m_q [16];
  word_t      h_q [8];
  logic [3:0] round_q;
  logic       busy_q;

  // One round, combinational.
  word_t x [16];   // message words in schedule order
  word_t c [16];   // after the column layer

  always_comb begin
    for (int k = 0; k < 16; k++) x[k] = m_q[B2_SIGMA[round_q % 10][k]];
  end

  for (genvar k = 0; k < 4; k++) begin : g_col
    blake2b_mix u_mix (
      .a_i(v_q[k]), .b_i(v_q[k+4]), .c_i(v_q[k+8]), .d_i(v_q[k+12]),
      .x_i(x[2*k]), .y_i(x[2*k+1]),
      .a_o(c[k]),   .b_o(c[k+4]),   .c_o(c[k+8]),   .d_o(c[k+12])
    );
  end
  for (genvar k = 0; k < 4; k++) begin : g_diag
    blake2b_mix u_mix (
      .a_i(c[k]),   .b_i(c[4 + (k+1)%4]),   .c_i(c[8 + (k+2)%4]),   .d_i(c[12 + (k+3)%4]),
      .x_i(x[8+2*k]), .y_i(x[9+2*k]),
      .a_o(v_d[k]), .b_o(v_d[4 + (k+1)%4]), .c_o(v_d[8 + (k+2)%4]), .d_o(v_d[12 + (k+3)%4])
    );
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      busy_q  <= 1'b0;
      done_o  <= 1'b0;
      round_q <= '0;
      for (int k = 0; k < 16; k++) begin v_q[k] <= '0; m_q[k] <= '0; end
      for (int k = 0; k < 8; k++) begin h_q[k] <= '0; h_o[k] <= '0; end
    end else begin
      done_o <= 1'b0;
      if (start_i && !busy_q) begin
        busy_q  <= 1'b1;
        round_q <= '0;
        for (int k = 0; k < 8; k++) begin
          v_q[k]   <= h_i[k];
          v_q[k+8] <= B2_IV[k];
          h_q[k]   <= h_i[k];
        end
        v_q[12] <= B2_IV[4] ^ t_i[63:0];
        v_q[13] <= B2_IV[5] ^ t_i[127:64];
        v_q[14] <= last_i ? ~B2_IV[6] : B2_IV[6];
        for (int k = 0; k < 16; k++) m_q[k] <= m_i[k];
      end else if (busy_q) begin
        v_q     <= v_d;
        round_q <= round_q + 4'd1;
        if (round_q == 4'(B2_ROUNDS - 1)) begin
          busy_q <= 1'b0;
          done_o <= 1'b1;
          for (int k = 0; k < 8; k++) h_o[k] <= h_q[k] ^ v_d[k] ^ v_d[k+8];
        end
      end
    end
  end

  assign busy_o = busy_q;
endmodule
