// blake2b_mix: the BLAKE2b mixing function G (called "Mix" in the Argon2id
// description).
//
// Combinational. Takes four state words a, b, c, d and two message words
// x, y and returns the mixed words:
//   a += b + x; d = (d ^ a) >>> 32; c += d; b = (b ^ c) >>> 24;
//   a += b + y; d = (d ^ a) >>> 16; c += d; b = (b ^ c) >>> 63.
// All additions are modulo 2^64. The rotation amounts are the ones the
// description gives; nothing here is a design choice.
module blake2b_mix
  import argon2_pkg::*;
(
  input  word_t a_i, b_i, c_i, d_i,
  input  word_t x_i, y_i,
  output word_t a_o, b_o, c_o, d_o
);
  always_comb begin
    word_t a, b, c, d;
    a = a_i; b = b_i; c = c_i; d = d_i;
    a = a + b + x_i;  d = rotr64(d ^ a, 32);
    c = c + d;        b = rotr64(b ^ c, 24);
    a = a + b + y_i;  d = rotr64(d ^ a, 16);
    c = c + d;        b = rotr64(b ^ c, 63);
    a_o = a; b_o = b; c_o = c; d_o = d;
  end
endmodule
