// blake2b_compress_tb: checks the BLAKE2b compression function.
//  - Known answer: the single final block "abc" with the 64-byte parameter
//    block must give the standard BLAKE2b-512("abc") digest.
//  - 50 random chaining values, message blocks, counters and final flags,
//    against a model of F written here.
//  - Latency: done_o must be high in the 13th cycle after the one with start_i.
module blake2b_compress_tb;
  import argon2_pkg::*;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start, last, busy, done;
  word_t h [8], m [16], ho [8];
  logic [127:0] t;
  int checks = 0, failures = 0;

  blake2b_compress dut (.clk_i(clk), .rst_ni(rst_n), .start_i(start), .h_i(h), .m_i(m),
                        .t_i(t), .last_i(last), .busy_o(busy), .done_o(done), .h_o(ho));

  localparam logic [3:0] SG [10][16] = '{
    '{0,1,2,3,4,5,6,7,8,9,10,11,12,13,14,15}, '{14,10,4,8,9,15,13,6,1,12,0,2,11,7,5,3},
    '{11,8,12,0,5,2,15,13,10,14,3,6,7,1,9,4}, '{7,9,3,1,13,12,11,14,2,6,5,10,4,0,15,8},
    '{9,0,5,7,2,4,10,15,14,1,11,12,6,8,3,13}, '{2,12,6,10,0,11,8,3,4,13,7,5,15,14,1,9},
    '{12,5,1,15,14,13,4,10,0,7,6,3,9,2,8,11}, '{13,11,7,14,12,1,3,9,5,0,15,4,8,6,2,10},
    '{6,15,14,9,11,3,0,8,12,2,13,7,1,4,10,5}, '{10,2,8,4,7,6,1,5,15,11,9,14,3,12,13,0}};
  localparam word_t IV [8] = '{
    64'h6A09E667F3BCC908, 64'hBB67AE8584CAA73B, 64'h3C6EF372FE94F82B, 64'hA54FF53A5F1D36F1,
    64'h510E527FADE682D1, 64'h9B05688C2B3E6C1F, 64'h1F83D9ABFB41BD6B, 64'h5BE0CD19137E2179};

  function automatic word_t rr(word_t v, int n);
    return {v, v} >> n;
  endfunction
  task automatic g(ref word_t v [16], input int a, b, c, d, input word_t x, y);
    v[a] = v[a] + v[b] + x; v[d] = rr(v[d] ^ v[a], 32); v[c] = v[c] + v[d]; v[b] = rr(v[b] ^ v[c], 24);
    v[a] = v[a] + v[b] + y; v[d] = rr(v[d] ^ v[a], 16); v[c] = v[c] + v[d]; v[b] = rr(v[b] ^ v[c], 63);
  endtask
  task automatic model(input word_t hh [8], input word_t mm [16], input logic [127:0] tt,
                       input logic f, output word_t r [8]);
    word_t v [16];
    for (int i = 0; i < 8; i++) begin v[i] = hh[i]; v[i+8] = IV[i]; end
    v[12] ^= tt[63:0]; v[13] ^= tt[127:64];
    if (f) v[14] = ~v[14];
    for (int rd = 0; rd < 12; rd++) begin
      g(v, 0, 4, 8, 12, mm[SG[rd%10][0]], mm[SG[rd%10][1]]);
      g(v, 1, 5, 9, 13, mm[SG[rd%10][2]], mm[SG[rd%10][3]]);
      g(v, 2, 6, 10, 14, mm[SG[rd%10][4]], mm[SG[rd%10][5]]);
      g(v, 3, 7, 11, 15, mm[SG[rd%10][6]], mm[SG[rd%10][7]]);
      g(v, 0, 5, 10, 15, mm[SG[rd%10][8]], mm[SG[rd%10][9]]);
      g(v, 1, 6, 11, 12, mm[SG[rd%10][10]], mm[SG[rd%10][11]]);
      g(v, 2, 7, 8, 13, mm[SG[rd%10][12]], mm[SG[rd%10][13]]);
      g(v, 3, 4, 9, 14, mm[SG[rd%10][14]], mm[SG[rd%10][15]]);
    end
    for (int i = 0; i < 8; i++) r[i] = hh[i] ^ v[i] ^ v[i+8];
  endtask

  task automatic run(output int lat);
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    lat = 1;
    while (!done) begin @(negedge clk); lat++; end
  endtask

  localparam logic [511:0] ABC = 512'h239900d4ed8623b95a92f1dba88ad31895cc3345ded552c22d79ab2a39c5877dd1a2ffdb6fbb124bb7c45a68142f214ce9f6129fb697276a0d4d1c983fa580ba;

  initial begin
    word_t r [8];
    int lat;
    logic [511:0] got;
    start = 0; last = 0; t = '0;
    for (int i = 0; i < 8; i++) h[i] = IV[i];
    for (int i = 0; i < 16; i++) m[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    h[0] = IV[0] ^ 64'h0101_0040;
    m[0] = 64'h636261; t = 128'd3; last = 1'b1;
    run(lat);
    for (int i = 0; i < 8; i++) got[64*i +: 64] = ho[i];
    checks++;
    if (got !== ABC) begin failures++; $display("FAIL: abc digest %h", got); end
    checks++;
    if (lat != 13) begin failures++; $display("FAIL: latency %0d", lat); end
    for (int n = 0; n < 50; n++) begin
      for (int i = 0; i < 8; i++) h[i] = {$urandom, $urandom};
      for (int i = 0; i < 16; i++) m[i] = {$urandom, $urandom};
      t = {$urandom, $urandom, $urandom, $urandom};
      last = 1'($urandom);
      model(h, m, t, last, r);
      run(lat);
      checks++;
      if (ho != r) begin failures++; $display("FAIL: random block %0d", n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
