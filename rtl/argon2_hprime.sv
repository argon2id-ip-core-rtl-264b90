// argon2_hprime: the variable-length hash H' of Argon2, built on BLAKE2b.
//
// start_i with len_i = T begins a hash of T output bytes over a message
// that arrives as a byte stream (msg_valid_i/msg_ready_o, msg_last_i on the
// final byte). The hasher first absorbs LE32(T), then the message.
//   T <= 64 : the output is BLAKE2b-T(LE32(T) || message).
//   T >  64 : V1 = BLAKE2b-64(LE32(T) || message); each further V is
//             BLAKE2b of the previous 64-byte V; the output is the first
//             32 bytes of every V but the last, then the whole last V,
//             whose length is what remains (at most 64 bytes).
// This is r = ceil(T/32) - 2 full 32-byte pieces followed by one hash of
// T - 32r bytes, as in the Argon2 specification (see the README for the
// piece count). With raw_i set the LE32(T) prefix is skipped and T must be
// at most 64: plain BLAKE2b-T, used for H0.
// Output bytes leave as 64-bit little-endian words on out_valid_o /
// out_word_o, one per cycle and without back-pressure; out_last_o marks the
// final word, whose upper bytes beyond T are not part of the hash. done_o
// pulses in the cycle after the final word.
module argon2_hprime
  import argon2_pkg::*;
(
  input  logic        clk_i,
  input  logic        rst_ni,
  input  logic        start_i,
  input  logic        raw_i,
  input  logic [31:0] len_i,
  input  logic        msg_valid_i,
  input  logic [7:0]  msg_byte_i,
  input  logic        msg_last_i,
  output logic        msg_ready_o,
  output logic        out_valid_o,
  output word_t       out_word_o,
  output logic        out_last_o,
  output logic        done_o
);
  typedef enum logic [2:0] {S_IDLE, S_PREFIX, S_MSG, S_WAIT, S_OUT, S_CHAIN} state_e;

  state_e        state_q;
  logic [31:0]   len_q;       // T
  logic [31:0]   left_q;      // output bytes not yet produced
  logic [511:0]  v_q;         // last digest V
  logic [6:0]    cnt_q;       // byte / word counter
  logic [3:0]    nwords_q;    // words to emit from v_q
  logic          final_q;     // v_q is the last piece

  logic          b_init, b_valid, b_last, b_ready, b_done;
  logic [7:0]    b_byte;
  logic [511:0]  b_digest;
  logic [6:0]    b_outlen;

  blake2b_hash u_h (
    .clk_i, .rst_ni,
    .init_i(b_init), .outlen_i(b_outlen),
    .msg_valid_i(b_valid), .msg_byte_i(b_byte), .msg_last_i(b_last),
    .msg_ready_o(b_ready), .done_o(b_done), .digest_o(b_digest)
  );


  always_comb begin
    b_init   = 1'b0;
    b_outlen = 7'd64;
    b_valid  = 1'b0;
    b_byte   = '0;
    b_last   = 1'b0;
    msg_ready_o = 1'b0;
    if (start_i && state_q == S_IDLE) begin
      b_init   = 1'b1;
      b_outlen = (len_i > 32'd64) ? 7'd64 : len_i[6:0];
    end else if (state_q == S_OUT && cnt_q == 7'(nwords_q) - 7'd1 && !final_q) begin
      b_init   = 1'b1;
      b_outlen = (left_q > 32'd64) ? 7'd64 : left_q[6:0];
    end
    unique case (state_q)
      S_PREFIX: begin
        b_valid = 1'b1;
        b_byte  = len_q[8*cnt_q[1:0] +: 8];
      end
      S_MSG: begin
        b_valid     = msg_valid_i;
        b_byte      = msg_byte_i;
        b_last      = msg_last_i;
        msg_ready_o = b_ready;
      end
      S_CHAIN: begin
        b_valid = 1'b1;
        b_byte  = v_q[8*cnt_q[5:0] +: 8];
        b_last  = (cnt_q == 7'd63);
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      state_q  <= S_IDLE;
      len_q    <= '0;
      left_q   <= '0;
      v_q      <= '0;
      cnt_q    <= '0;
      nwords_q <= '0;
      final_q  <= 1'b0;
      done_o   <= 1'b0;
    end else begin
      done_o <= 1'b0;
      unique case (state_q)
        S_IDLE: if (start_i) begin
          len_q   <= len_i;
          left_q  <= len_i;
          cnt_q   <= '0;
          state_q <= raw_i ? S_MSG : S_PREFIX;
        end
        S_PREFIX: if (b_ready) begin
          cnt_q <= cnt_q + 7'd1;
          if (cnt_q == 7'd3) state_q <= S_MSG;
        end
        S_MSG: if (msg_valid_i && b_ready && msg_last_i) state_q <= S_WAIT;
        S_WAIT: if (b_done) begin
          v_q   <= b_digest;
          cnt_q <= '0;
          if (left_q <= 32'd64) begin
            final_q  <= 1'b1;
            nwords_q <= 4'((left_q + 32'd7) >> 3);
            left_q   <= '0;
          end else begin
            final_q  <= 1'b0;
            nwords_q <= 4'd4;
            left_q   <= left_q - 32'd32;
          end
          state_q <= S_OUT;
        end
        S_OUT: begin
          cnt_q <= cnt_q + 7'd1;
          if (cnt_q == 7'(nwords_q) - 7'd1) begin
            cnt_q <= '0;
            if (final_q) begin
              done_o  <= 1'b1;
              state_q <= S_IDLE;
            end else begin
              state_q <= S_CHAIN;
            end
          end
        end
        S_CHAIN: if (b_ready) begin
          cnt_q <= cnt_q + 7'd1;
          if (cnt_q == 7'd63) state_q <= S_WAIT;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assign out_valid_o = (state_q == S_OUT);
  assign out_word_o  = v_q[64*cnt_q[2:0] +: 64];
  assign out_last_o  = (state_q == S_OUT) && final_q && (cnt_q == 7'(nwords_q) - 7'd1);

  // A new hash may only start when the previous one has finished.
  a_start_idle: assert property (@(posedge clk_i) disable iff (!rst_ni)
                                 start_i |-> state_q == S_IDLE);
  // The final word is followed by done_o.
  a_last_done: assert property (@(posedge clk_i) disable iff (!rst_ni)
                                out_last_o |=> done_o);
endmodule
