// argon2id_params_tb: runs the Argon2 core over parameter sets other than
// the standard known-answer input, with expected tags from an independent
// software implementation:
//   A  Argon2id  p=1 T=16 m=32 t=2  "password" / "somesalt"
//   B  Argon2id  p=3 T=20 m=16 t=1  5-byte password, 3-byte key; m is
//                raised to 8p = 24 blocks
//   C  Argon2i   p=2 T=32 m=31 t=2  associated data; m' rounds down to 24
//   D  Argon2d   p=1 T=4  m=8  t=1  the shortest tag
//   E  Argon2id  p=2 T=32 m=16 t=1  all strings at full port width, so
//                the H0 input (132 bytes) spans two BLAKE2b blocks
// It checks each tag (and that bytes beyond T are zero), then that lanes
// above the memory size and a tag longer than the port are rejected.
module argon2id_params_tb;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         valid_i, valid_o, error_o, cready, busy;
  logic [255:0] pwd, tag;
  logic [127:0] salt;
  logic [255:0] key;
  logic [95:0]  ad;
  logic [31:0]  pwd_len, salt_len, key_len, ad_len, lanes, tag_len, mem_kib, passes, version, typ;
  int checks = 0, failures = 0;

  argon2id dut (
    .clk_i(clk), .rst_ni(rst_n), .valid_i(valid_i),
    .pwd_i(pwd), .pwd_len_i(pwd_len), .salt_i(salt), .salt_len_i(salt_len),
    .key_i(key), .key_len_i(key_len), .ad_i(ad), .ad_len_i(ad_len),
    .lanes_i(lanes), .tag_len_i(tag_len), .mem_kib_i(mem_kib), .passes_i(passes),
    .version_i(version), .type_i(typ),
    .valid_o(valid_o), .error_o(error_o), .tag_o(tag), .compressed_ready_o(cready), .busy_o(busy)
  );

  task automatic run(input string name, input logic [255:0] exp, input bit exp_err);
    @(negedge clk);
    valid_i = 1'b1;
    @(negedge clk);
    valid_i = 1'b0;
    while (!valid_o) @(negedge clk);
    checks++;
    if (error_o !== exp_err || (!exp_err && tag !== exp)) begin
      failures++;
      $display("FAIL: %s: error %b tag %h", name, error_o, tag);
    end else $display("%s ok", name);
  endtask

  initial begin
    valid_i = 0; version = 32'h13;
    repeat (3) @(negedge clk);
    rst_n = 1;

    pwd = {"password", 192'd0}; pwd_len = 8;
    salt = {"somesalt", 64'd0}; salt_len = 8;
    key = '0; key_len = 0; ad = '0; ad_len = 0;
    lanes = 1; tag_len = 16; mem_kib = 32; passes = 2; typ = 2;
    run("A", {128'h4c0c6205e90ee22387bd8737abfce7fc, 128'd0}, 0);

    pwd = {"hello", 216'd0}; pwd_len = 5;
    salt = {"saltsaltsalt", 32'd0}; salt_len = 12;
    key = {"key", 232'd0}; key_len = 3;
    lanes = 3; tag_len = 20; mem_kib = 16; passes = 1; typ = 2;
    run("B", {160'h0b602f6df7af89aba780f9beeb1fba454844d27b, 96'd0}, 0);

    pwd = {"0123456789abcdef", 128'd0}; pwd_len = 16;
    salt = {"NaCl-NaCl", 56'd0}; salt_len = 9;
    key = '0; key_len = 0; ad = {"assoc", 56'd0}; ad_len = 5;
    lanes = 2; tag_len = 32; mem_kib = 31; passes = 2; typ = 1;
    run("C", 256'h8d5178da58588dc43030d6bd20a7b8e3c98d42ad8fc0ee9af57f78da6fea364c, 0);

    pwd = {"x", 248'd0}; pwd_len = 1;
    salt = {"12345678", 64'd0}; salt_len = 8;
    key = {"k", 248'd0}; key_len = 1; ad = {"ad", 80'd0}; ad_len = 2;
    lanes = 1; tag_len = 4; mem_kib = 8; passes = 1; typ = 0;
    run("D", {32'h39ed6987, 224'd0}, 0);

    for (int i = 0; i < 32; i++) begin
      pwd[255 - 8*i -: 8] = 8'(i);
      key[255 - 8*i -: 8] = 8'(200 + i);
    end
    for (int i = 0; i < 16; i++) salt[127 - 8*i -: 8] = 8'(100 + i);
    for (int i = 0; i < 12; i++) ad[95 - 8*i -: 8] = 8'(50 + i);
    pwd_len = 32; salt_len = 16; key_len = 32; ad_len = 12;
    lanes = 2; tag_len = 32; mem_kib = 16; passes = 1; typ = 2;
    run("E", 256'ha33884593ccc1752b6800e4b9c49c3da88814fb59b6f80a5a672a4e88dc076cd, 0);

    lanes = 5;  run("lanes beyond memory", '0, 1);
    lanes = 1; tag_len = 33; run("tag beyond port", '0, 1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
