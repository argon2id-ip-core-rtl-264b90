// argon2_hprime_tb: checks the variable-length hash H' for T = 32 (one
// BLAKE2b), T = 100 (three pieces: 32 + 32 + 36 bytes) and T = 1024 (the
// size of a memory block: 30 pieces of 32 bytes and one of 64), all over the
// 72-byte message (5i + 1) mod 256, and the raw mode (plain BLAKE2b-64 of
// "abc"). Expected values come from an independent software
// implementation; the 1024-byte output is checked by its first and last
// word, its word count and the xor of all its words. The message source
// inserts random idle cycles.
module argon2_hprime_tb;
  import argon2_pkg::*;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start, raw, valid, last, ready, ovalid, olast, done;
  logic [31:0] len;
  logic [7:0] data;
  word_t oword;
  int checks = 0, failures = 0;

  argon2_hprime dut (.clk_i(clk), .rst_ni(rst_n), .start_i(start), .raw_i(raw), .len_i(len),
                     .msg_valid_i(valid), .msg_byte_i(data), .msg_last_i(last),
                     .msg_ready_o(ready), .out_valid_o(ovalid), .out_word_o(oword),
                     .out_last_o(olast), .done_o(done));

  word_t outw [$];
  always @(posedge clk) if (ovalid) outw.push_back(oword);

  task automatic run(input int T, input bit r);
    int i = 0, n;
    n = r ? 3 : 72;
    outw.delete();
    @(negedge clk);
    start = 1; len = T; raw = r;
    @(negedge clk);
    start = 0;
    while (i < n) begin
      valid = ($urandom % 3) != 0;
      data  = r ? 8'(8'h61 + i) : 8'((5 * i + 1) % 256);
      last  = (i == n - 1);
      @(posedge clk);
      if (valid && ready) i++;
      @(negedge clk);
    end
    valid = 0; last = 0;
    while (!done) @(negedge clk);
  endtask

  function automatic word_t fold();
    word_t f = '0;
    foreach (outw[k]) f ^= outw[k];
    return f;
  endfunction

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [799:0] got;
    start = 0; raw = 0; valid = 0; last = 0; data = 0; len = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;

    run(32, 0);
    chk(outw.size() == 4, "T=32 word count");
    chk(outw[0] == 64'h16c57324e88dbfa9 && outw[3] == 64'h9f8c6fbb08da4b01 && fold() == 64'ha177c58c6c47fad6, "T=32 value");

    run(100, 0);
    chk(outw.size() == 13, "T=100 word count");
    for (int k = 0; k < 13; k++) got[64*k +: 64] = (k == 12) ? outw[k] & 64'hffff_ffff : outw[k];
    chk(got[799:0] == 800'h06012622541afb441e65af1b1970875c5cd792b2040a669da6a4d137ac41b46dad420a07b35cd7ea81971f0603a930ef18dfc5892dd9b124076a57072f08085c3d5d558b032d5d5723ac4ac1abd4a2a59d570d801848b988e897a852dc8307232fd4ee6b,
        "T=100 value");

    run(1024, 0);
    chk(outw.size() == 128, "T=1024 word count");
    chk(outw[0] == 64'ha13b68cc15ff5792 && outw[127] == 64'h0d4682ae972fb6f9, "T=1024 first/last word");
    chk(fold() == 64'h14bcbb9372a60743, "T=1024 xor of all words");

    run(64, 1);
    chk(outw.size() == 8, "raw word count");
    for (int k = 0; k < 8; k++) got[64*k +: 64] = outw[k];
    chk(got[511:0] == 512'h239900d4ed8623b95a92f1dba88ad31895cc3345ded552c22d79ab2a39c5877dd1a2ffdb6fbb124bb7c45a68142f214ce9f6129fb697276a0d4d1c983fa580ba,
        "raw BLAKE2b-64(abc)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
