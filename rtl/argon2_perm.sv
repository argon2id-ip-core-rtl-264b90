// argon2_perm: the permutation P of the Argon2 compression function.
//
// Combinational. P is one BLAKE2b round without message words, applied to
// sixteen 64-bit words v[0..15]: first the four column mixes
// (0,4,8,12) (1,5,9,13) (2,6,10,14) (3,7,11,15), then the four diagonal
// mixes (0,5,10,15) (1,6,11,12) (2,7,8,13) (3,4,9,14), each with the
// multiply-add mixing function argon2_gb. Eight mixes in two layers; the
// compression function applies P once per clock cycle.
module argon2_perm
  import argon2_pkg::*;
(
  input  word_t v_i [16],
  output word_t v_o [16]
);
  word_t m [16];  // after the column layer

  for (genvar k = 0; k < 4; k++) begin : g_col
    argon2_gb u_gb (
      .a_i(v_i[k]), .b_i(v_i[k+4]), .c_i(v_i[k+8]), .d_i(v_i[k+12]),
      .a_o(m[k]),   .b_o(m[k+4]),   .c_o(m[k+8]),   .d_o(m[k+12])
    );
  end

  for (genvar k = 0; k < 4; k++) begin : g_diag
    argon2_gb u_gb (
      .a_i(m[k]),   .b_i(m[4 + (k+1)%4]),   .c_i(m[8 + (k+2)%4]),   .d_i(m[12 + (k+3)%4]),
      .a_o(v_o[k]), .b_o(v_o[4 + (k+1)%4]), .c_o(v_o[8 + (k+2)%4]), .d_o(v_o[12 + (k+3)%4])
    );
  end
endmodule
