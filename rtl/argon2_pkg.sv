// argon2_pkg: constants and small functions shared by the Argon2id core.
//
// Holds the BLAKE2b initialisation vector (the SHA-512 IV), the BLAKE2b
// message schedule sigma, the word/byte helpers and the Argon2 sizes
// (1024-byte blocks of 128 64-bit words, 4 slices). The IV values and
// the four slices follow the Argon2id description; the sigma table is the
// standard BLAKE2b schedule, which the description only refers to as
// "mixes it differently for each round".
package argon2_pkg;

  typedef logic [63:0] word_t;

  localparam int unsigned BLOCK_WORDS  = 128;  // 1024-byte block
  localparam int unsigned SYNC_POINTS  = 4;    // slices per pass
  localparam int unsigned B2_ROUNDS    = 12;   // BLAKE2b rounds per compression
  localparam int unsigned ADDR_PER_BLK = 128;  // (J1,J2) pairs per address block

  localparam word_t B2_IV [8] = '{
    64'h6A09E667F3BCC908, 64'hBB67AE8584CAA73B,
    64'h3C6EF372FE94F82B, 64'hA54FF53A5F1D36F1,
    64'h510E527FADE682D1, 64'h9B05688C2B3E6C1F,
    64'h1F83D9ABFB41BD6B, 64'h5BE0CD19137E2179
  };

  // BLAKE2b message schedule; round r uses row r mod 10.
  localparam logic [3:0] B2_SIGMA [10][16] = '{
    '{ 0, 1, 2, 3, 4, 5, 6, 7, 8, 9,10,11,12,13,14,15},
    '{14,10, 4, 8, 9,15,13, 6, 1,12, 0, 2,11, 7, 5, 3},
    '{11, 8,12, 0, 5, 2,15,13,10,14, 3, 6, 7, 1, 9, 4},
    '{ 7, 9, 3, 1,13,12,11,14, 2, 6, 5,10, 4, 0,15, 8},
    '{ 9, 0, 5, 7, 2, 4,10,15,14, 1,11,12, 6, 8, 3,13},
    '{ 2,12, 6,10, 0,11, 8, 3, 4,13, 7, 5,15,14, 1, 9},
    '{12, 5, 1,15,14,13, 4,10, 0, 7, 6, 3, 9, 2, 8,11},
    '{13,11, 7,14,12, 1, 3, 9, 5, 0,15, 4, 8, 6, 2,10},
    '{ 6,15,14, 9,11, 3, 0, 8,12, 2,13, 7, 1, 4,10, 5},
    '{10, 2, 8, 4, 7, 6, 1, 5,15,11, 9,14, 3,12,13, 0}
  };

  function automatic word_t rotr64(word_t x, int unsigned n);
    return (x >> n) | (x << (64 - n));
  endfunction

  // Byte k of a little-endian 32-bit encoding.
  function automatic logic [7:0] le32_byte(logic [31:0] v, logic [1:0] k);
    return v[8*k +: 8];
  endfunction

endpackage
