// blake2b_hash_tb: hashes four messages through the byte-stream BLAKE2b
// unit and compares with known digests from an independent
// implementation: "abc" (64-byte digest), and the byte patterns
// (7i + 3) mod 256 of 128, 129 and 300 bytes (64-, 32- and 20-byte
// digests), which cover a message that exactly fills one block, one byte
// more than a block, and several blocks. The message source inserts random
// idle cycles, and the test checks that no byte is taken while ready is low.
module blake2b_hash_tb;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic init, valid, last, ready, done;
  logic [6:0] outlen;
  logic [7:0] data;
  logic [511:0] digest;
  int checks = 0, failures = 0;

  blake2b_hash dut (.clk_i(clk), .rst_ni(rst_n), .init_i(init), .outlen_i(outlen),
                    .msg_valid_i(valid), .msg_byte_i(data), .msg_last_i(last),
                    .msg_ready_o(ready), .done_o(done), .digest_o(digest));

  task automatic hash(input int n, input int ol, input bit abc, input logic [511:0] exp);
    int i = 0;
    logic [511:0] mask;
    @(negedge clk);
    init = 1; outlen = 7'(ol);
    @(negedge clk);
    init = 0;
    while (i < n) begin
      valid = ($urandom % 4) != 0;
      data  = abc ? 8'(8'h61 + i) : 8'((7 * i + 3) % 256);
      last  = (i == n - 1);
      @(posedge clk);
      if (valid && ready) i++;
      @(negedge clk);
    end
    valid = 0; last = 0;
    while (!done) @(negedge clk);
    mask = (ol == 64) ? '1 : ((512'd1 << (8 * ol)) - 1);
    checks++;
    if ((digest & mask) !== exp) begin
      failures++;
      $display("FAIL: %0d-byte message, digest %h", n, digest & mask);
    end
  endtask

  initial begin
    init = 0; valid = 0; last = 0; data = 0; outlen = 64;
    repeat (2) @(negedge clk);
    rst_n = 1;
    hash(3, 64, 1, 512'h239900d4ed8623b95a92f1dba88ad31895cc3345ded552c22d79ab2a39c5877dd1a2ffdb6fbb124bb7c45a68142f214ce9f6129fb697276a0d4d1c983fa580ba);
    hash(128, 64, 0, 512'hfb148808bd52b510854d76ed23eea5ab29ebac9774d3ebd64fafd413d5f499951f186dcb73733d81e97259f15bffca7fe8131cb89266641d60a3af429f329e2d);
    hash(129, 32, 0, 512'hf0ec1a4698a0e0108a7ebd285cd6ce22c043c1b6c49930bfdf41c5031e4e4aa3);
    hash(300, 20, 0, 512'ha85a51c7eee7b6cfe818e4290c87c2b69aa1b075);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
