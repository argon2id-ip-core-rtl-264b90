// argon2_compress_tb: checks the block compression function G.
//  - G(X, Y) for X[k] = k*0x9E3779B97F4A7C15 + 1, Y[k] = k*0xC2B2AE3D27D4EB4F + 7
//    against a known answer from an independent software implementation
//    (first word, last word, xor of all words) and, word by word, against
//    a model of G written here;
//  - the address-block sequence clear, load Z, start, chain, start, which
//    must give G(0, G(0, Z)), against the model;
//  - latency: done_o 17 cycles after the cycle with start_i, i.e. one
//    permutation P per cycle for the 16 rows and columns.
module argon2_compress_tb;
  import argon2_pkg::*;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic clear, ld, ldx, start, chain, busy, done;
  logic [6:0] ldidx, rdidx;
  word_t lddata, rddata;
  int checks = 0, failures = 0;

  argon2_compress dut (.clk_i(clk), .rst_ni(rst_n), .clear_i(clear), .ld_valid_i(ld),
    .ld_xor_i(ldx), .ld_idx_i(ldidx), .ld_data_i(lddata), .start_i(start), .chain_i(chain),
    .busy_o(busy), .done_o(done), .rd_idx_i(rdidx), .rd_data_o(rddata));

  function automatic word_t rr(word_t v, int n);
    return {v, v} >> n;
  endfunction
  function automatic word_t fm(word_t p, word_t q);
    return p + q + 64'd2 * {32'd0, p[31:0]} * {32'd0, q[31:0]};
  endfunction
  task automatic gb(ref word_t v [16], input int a, b, c, d);
    v[a] = fm(v[a], v[b]); v[d] = rr(v[d] ^ v[a], 32);
    v[c] = fm(v[c], v[d]); v[b] = rr(v[b] ^ v[c], 24);
    v[a] = fm(v[a], v[b]); v[d] = rr(v[d] ^ v[a], 16);
    v[c] = fm(v[c], v[d]); v[b] = rr(v[b] ^ v[c], 63);
  endtask
  task automatic perm(ref word_t v [16]);
    gb(v, 0, 4, 8, 12); gb(v, 1, 5, 9, 13); gb(v, 2, 6, 10, 14); gb(v, 3, 7, 11, 15);
    gb(v, 0, 5, 10, 15); gb(v, 1, 6, 11, 12); gb(v, 2, 7, 8, 13); gb(v, 3, 4, 9, 14);
  endtask
  task automatic model(input word_t x [128], input word_t y [128], output word_t o [128]);
    word_t r [128], q [128], v [16];
    for (int k = 0; k < 128; k++) begin r[k] = x[k] ^ y[k]; q[k] = r[k]; end
    for (int i = 0; i < 8; i++) begin
      for (int n = 0; n < 16; n++) v[n] = q[16*i + n];
      perm(v);
      for (int n = 0; n < 16; n++) q[16*i + n] = v[n];
    end
    for (int i = 0; i < 8; i++) begin
      for (int n = 0; n < 16; n++) v[n] = q[2*i + n%2 + 16*(n/2)];
      perm(v);
      for (int n = 0; n < 16; n++) q[2*i + n%2 + 16*(n/2)] = v[n];
    end
    for (int k = 0; k < 128; k++) o[k] = q[k] ^ r[k];
  endtask

  task automatic load(input word_t d [128], input bit x, input int n);
    for (int k = 0; k < n; k++) begin
      ld = 1; ldx = x; ldidx = 7'(k); lddata = d[k];
      @(negedge clk);
    end
    ld = 0; ldx = 0;
  endtask
  task automatic go(output int lat);
    start = 1;
    @(negedge clk);
    start = 0;
    lat = 1;
    while (!done) begin @(negedge clk); lat++; end
  endtask
  task automatic compare(input word_t e [128], input string what);
    int bad = 0;
    for (int k = 0; k < 128; k++) begin
      rdidx = 7'(k);
      #1;
      if (rddata !== e[k]) bad++;
    end
    checks++;
    if (bad != 0) begin failures++; $display("FAIL: %s, %0d words differ", what, bad); end
  endtask

  initial begin
    word_t x [128], y [128], z [128], zero [128], o [128], o1 [128];
    word_t f;
    int lat;
    clear = 0; ld = 0; ldx = 0; start = 0; chain = 0; ldidx = 0; lddata = 0; rdidx = 0;
    for (int k = 0; k < 128; k++) begin
      x[k] = 64'(k) * 64'h9E3779B97F4A7C15 + 64'd1;
      y[k] = 64'(k) * 64'hC2B2AE3D27D4EB4F + 64'd7;
      zero[k] = '0;
      z[k] = (k < 7) ? 64'(k * 3 + 1) : 64'd0;
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    load(x, 0, 128);
    load(y, 1, 128);
    go(lat);
    checks++;
    if (lat != 17) begin failures++; $display("FAIL: latency %0d", lat); end
    f = '0;
    for (int k = 0; k < 128; k++) begin rdidx = 7'(k); #1; f ^= rddata; end
    rdidx = 0; #1;
    checks++;
    if (rddata !== 64'h502631d3b084672b) begin failures++; $display("FAIL: word 0 %h", rddata); end
    rdidx = 127; #1;
    checks++;
    if (rddata !== 64'h57c74b1937934e59) begin failures++; $display("FAIL: word 127 %h", rddata); end
    checks++;
    if (f !== 64'hdb52d10ecd2d2ea3) begin failures++; $display("FAIL: xor of words %h", f); end
    model(x, y, o);
    compare(o, "G(X,Y)");
    @(negedge clk);

    clear = 1;
    @(negedge clk);
    clear = 0;
    load(z, 0, 7);
    go(lat);
    chain = 1;
    @(negedge clk);
    chain = 0;
    go(lat);
    model(zero, z, o1);
    model(zero, o1, o);
    compare(o, "G(0, G(0, Z))");

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
