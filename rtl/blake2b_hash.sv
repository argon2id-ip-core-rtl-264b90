// blake2b_hash: the BLAKE2b hash H over a message delivered one byte at a
// time, with a digest length of 1 to 64 bytes (unkeyed).
//
// init_i (with outlen_i) starts a new hash: the chaining value becomes the
// IV with parameter block word 0x0101_0000 ^ outlen xored into h[0]. Message
// bytes are then accepted on msg_valid_i/msg_ready_o, the final one marked by
// msg_last_i; a message has at least one byte. Bytes are packed
// little-endian into a 128-byte buffer. A full buffer is compressed (not
// final) only once a further byte arrives, so the last block is always
// compressed with the final flag, zero-padded as the description's padding
// stage requires. The byte counter t counts message bytes, including the
// final partial block. msg_ready_o is low while a block is being compressed
// (14 cycles). When the final block is done, done_o pulses for one cycle and
// digest_o holds the 64-byte chaining value, byte k at bits [8k+7:8k]; the
// first outlen bytes are the hash. The byte-serial interface is a choice of
// this design.
module blake2b_hash
  import argon2_pkg::*;
(
  input  logic         clk_i,
  input  logic         rst_ni,
  input  logic         init_i,
  input  logic [6:0]   outlen_i,     // 1..64
  input  logic         msg_valid_i,
  input  logic [7:0]   msg_byte_i,
  input  logic         msg_last_i,
  output logic         msg_ready_o,
  output logic         done_o,
  output logic [511:0] digest_o
);
  typedef enum logic [2:0] {S_IDLE, S_ABSORB, S_COMP, S_LAST, S_FINAL} state_e;

  state_e        state_q;
  word_t         h_q [8];
  logic [1023:0] buf_q;
  logic [7:0]    cnt_q;      // bytes in buffer, 0..128
  logic [127:0]  t_q;        // bytes compressed so far
  logic [7:0]    pend_byte_q;
  logic          pend_last_q;

  word_t         m_w [16];
  word_t         h_new [8];
  logic          c_start, c_last, c_busy, c_done;
  logic [127:0]  c_t;

  always_comb for (int k = 0; k < 16; k++) m_w[k] = buf_q[64*k +: 64];

  blake2b_compress u_f (
    .clk_i, .rst_ni,
    .start_i(c_start), .h_i(h_q), .m_i(m_w), .t_i(c_t), .last_i(c_last),
    .busy_o(c_busy), .done_o(c_done), .h_o(h_new)
  );

  assign msg_ready_o = (state_q == S_ABSORB);

  always_comb begin
    c_start = 1'b0;
    c_last  = 1'b0;
    c_t     = t_q;
    if (state_q == S_ABSORB && msg_valid_i && cnt_q == 8'd128) begin
      c_start = 1'b1;                                       // more data: flush full block
      c_t     = t_q + 128'd128;
    end else if (state_q == S_LAST) begin
      c_start = 1'b1;                                       // final, zero-padded block
      c_last  = 1'b1;
    end
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      state_q     <= S_IDLE;
      buf_q       <= '0;
      cnt_q       <= '0;
      t_q         <= '0;
      pend_byte_q <= '0;
      pend_last_q <= 1'b0;
      done_o      <= 1'b0;
      for (int k = 0; k < 8; k++) h_q[k] <= '0;
    end else begin
      done_o <= 1'b0;
      if (init_i) begin
        state_q <= S_ABSORB;
        buf_q   <= '0;
        cnt_q   <= '0;
        t_q     <= '0;
        for (int k = 0; k < 8; k++) h_q[k] <= B2_IV[k];
        h_q[0]  <= B2_IV[0] ^ 64'h0101_0000 ^ 64'(outlen_i);
      end else begin
        unique case (state_q)
          S_IDLE: ;
          S_ABSORB: if (msg_valid_i) begin
            if (cnt_q == 8'd128) begin
              // compress the full block; the new byte waits
              pend_byte_q <= msg_byte_i;
              pend_last_q <= msg_last_i;
              t_q         <= t_q + 128'd128;
              state_q     <= S_COMP;
            end else begin
              buf_q[8*cnt_q +: 8] <= msg_byte_i;
              cnt_q               <= cnt_q + 8'd1;
              if (msg_last_i) begin
                t_q     <= t_q + 128'(cnt_q) + 128'd1;
                state_q <= S_LAST;
              end
            end
          end
          S_COMP: if (c_done) begin
            for (int k = 0; k < 8; k++) h_q[k] <= h_new[k];
            buf_q   <= {1016'b0, pend_byte_q};
            cnt_q   <= 8'd1;
                if (pend_last_q) begin
              // the waiting byte was the last one: it forms the final block
              t_q     <= t_q + 128'd1;
              state_q <= S_LAST;
            end else begin
              state_q <= S_ABSORB;
            end
          end
          S_LAST: state_q <= S_FINAL;
          S_FINAL: if (c_done) begin
            for (int k = 0; k < 8; k++) h_q[k] <= h_new[k];
            done_o  <= 1'b1;
            state_q <= S_IDLE;
          end
          default: state_q <= S_IDLE;
        endcase
      end
    end
  end

  always_comb for (int k = 0; k < 8; k++) digest_o[64*k +: 64] = h_q[k];

  // A new hash is not started in the middle of a compression, and a block
  // is only handed to F when F is free.
  a_no_init_busy: assert property (@(posedge clk_i) disable iff (!rst_ni)
                                   init_i |-> state_q inside {S_IDLE, S_ABSORB});
  a_f_free: assert property (@(posedge clk_i) disable iff (!rst_ni)
                             c_start |-> !c_busy);
endmodule
