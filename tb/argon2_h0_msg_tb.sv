// argon2_h0_msg_tb: checks the byte sequence of the H0 input buffer.
// Builds the expected sequence here from the field list (six LE32
// parameters, then each string with its LE32 length in front) and compares
// it byte by byte with the serialiser output, including the last flag, for
// three cases: full-length strings, a shorter password with empty key and
// associated data, and an empty password. ready is toggled at random.
module argon2_h0_msg_tb;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start, valid, last, ready;
  logic [7:0] data;
  logic [31:0] p, tl, m, t, v, y, lp, ls, lk, lx;
  logic [255:0] pw;
  logic [127:0] s;
  logic [255:0] k;
  logic [95:0] x;
  int checks = 0, failures = 0;

  argon2_h0_msg dut (.clk_i(clk), .rst_ni(rst_n), .start_i(start),
    .lanes_i(p), .tag_len_i(tl), .mem_kib_i(m), .passes_i(t), .version_i(v), .type_i(y),
    .pwd_i(pw), .pwd_len_i(lp), .salt_i(s), .salt_len_i(ls), .key_i(k), .key_len_i(lk),
    .ad_i(x), .ad_len_i(lx), .valid_o(valid), .byte_o(data), .last_o(last), .ready_i(ready));

  logic [7:0] exp [$];
  task automatic le(input logic [31:0] w);
    for (int i = 0; i < 4; i++) exp.push_back(w[8*i +: 8]);
  endtask

  task automatic run();
    int i = 0;
    bit done = 0;
    exp.delete();
    le(p); le(tl); le(m); le(t); le(v); le(y);
    le(lp); for (int i2 = 0; i2 < lp; i2++) exp.push_back(pw[255 - 8*i2 -: 8]);
    le(ls); for (int i2 = 0; i2 < ls; i2++) exp.push_back(s[127 - 8*i2 -: 8]);
    le(lk); for (int i2 = 0; i2 < lk; i2++) exp.push_back(k[255 - 8*i2 -: 8]);
    le(lx); for (int i2 = 0; i2 < lx; i2++) exp.push_back(x[95 - 8*i2 -: 8]);
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    while (!done) begin
      ready = ($urandom % 3) != 0;
      @(posedge clk);
      if (valid && ready) begin
        checks++;
        if (i >= exp.size() || data !== exp[i] || last !== (i == exp.size() - 1)) begin
          failures++;
          if (failures < 10) $display("FAIL: byte %0d got %h last %b", i, data, last);
        end
        if (last) done = 1;
        i++;
      end
      if (i > 200) done = 1;
      @(negedge clk);
    end
    checks++;
    if (i != exp.size()) begin failures++; $display("FAIL: %0d bytes, expected %0d", i, exp.size()); end
    @(negedge clk);
    checks++;
    if (valid) begin failures++; $display("FAIL: valid after last"); end
  endtask

  initial begin
    start = 0; ready = 0;
    p = 4; tl = 32; m = 32; t = 3; v = 32'h13; y = 2;
    for (int i = 0; i < 32; i++) pw[8*i +: 8] = 8'(i + 8'h10);
    for (int i = 0; i < 16; i++) s[8*i +: 8] = 8'(i + 8'h40);
    k = {64'h8182838485868788, 192'h0};
    for (int i = 8; i < 32; i++) k[255 - 8*i -: 8] = 8'(8'h90 + i); x = 96'hc1c2c3c4c5c6c7c8c9cacbcc;
    lp = 32; ls = 16; lk = 32; lx = 12;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run();
    lp = 5; lk = 0; lx = 0; ls = 9; tl = 32'h12345678;
    run();
    lp = 0; lk = 3; lx = 1; ls = 8;
    run();
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
