// argon2_gb: the Argon2 variant of the BLAKE2b mixing function, used inside
// the permutation P of the block compression function G.
//
// Combinational. Same structure and rotations as the BLAKE2b Mix, but there
// is no message input and every addition x + y is replaced by
//   x + y + 2 * lo32(x) * lo32(y)        (mod 2^64)
// (the "BlaMka" multiply-add of the Argon2 specification). The Argon2id
// description only says that G is "based on Blake2b internal round
// function"; the multiply term is taken from the Argon2 specification
// because without it the core does not produce the Argon2id tags that the
// design is verified against.
module argon2_gb
  import argon2_pkg::*;
(
  input  word_t a_i, b_i, c_i, d_i,
  output word_t a_o, b_o, c_o, d_o
);
  function automatic word_t fbla(word_t x, word_t y);
    word_t m;
    m = word_t'(x[31:0]) * word_t'(y[31:0]);
    return x + y + (m << 1);
  endfunction

  always_comb begin
    word_t a, b, c, d;
    a = a_i; b = b_i; c = c_i; d = d_i;
    a = fbla(a, b); d = rotr64(d ^ a, 32);
    c = fbla(c, d); b = rotr64(b ^ c, 24);
    a = fbla(a, b); d = rotr64(d ^ a, 16);
    c = fbla(c, d); b = rotr64(b ^ c, 63);
    a_o = a; b_o = b; c_o = c; d_o = d;
  end
endmodule
