// argon2id_bigmem_tb: runs the Argon2 core with a 1 MiB memory
// (MAX_BLOCKS = 1024), so that segments are long enough for a second
// address block to be generated in the middle of a segment (every 128
// blocks). Expected tags come from an independent software implementation:
//   Argon2id  p=1 T=32 m=1024 t=2  "password" / "somesalt"
//   Argon2i   p=2 T=32 m=1024 t=1  "password" / "somesalt"
// Address-block counts: Argon2id with 256-block segments needs two per
// segment in slices 0 and 1 of pass 0 (4); Argon2i with 128-block segments
// needs one per segment (8).
module argon2id_bigmem_tb;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         valid_i, valid_o, error_o, cready, busy;
  logic [255:0] pwd, tag, key;
  logic [127:0] salt;
  logic [95:0]  ad;
  logic [31:0]  pwd_len, salt_len, key_len, ad_len, lanes, tag_len, mem_kib, passes, version, typ;
  int checks = 0, failures = 0, n_addr = 0;

  argon2id #(.MAX_BLOCKS(1024)) dut (
    .clk_i(clk), .rst_ni(rst_n), .valid_i(valid_i),
    .pwd_i(pwd), .pwd_len_i(pwd_len), .salt_i(salt), .salt_len_i(salt_len),
    .key_i(key), .key_len_i(key_len), .ad_i(ad), .ad_len_i(ad_len),
    .lanes_i(lanes), .tag_len_i(tag_len), .mem_kib_i(mem_kib), .passes_i(passes),
    .version_i(version), .type_i(typ),
    .valid_o(valid_o), .error_o(error_o), .tag_o(tag), .compressed_ready_o(cready), .busy_o(busy)
  );

  always @(posedge clk) if (rst_n && dut.g_clear) n_addr++;

  task automatic run(input string name, input logic [255:0] exp, input int exp_addr);
    int a0 = n_addr, cyc = 0;
    @(negedge clk);
    valid_i = 1'b1;
    @(negedge clk);
    valid_i = 1'b0;
    while (!valid_o) begin @(negedge clk); cyc++; end
    checks++;
    if (error_o || tag !== exp) begin
      failures++;
      $display("FAIL: %s: error %b tag %h", name, error_o, tag);
    end
    checks++;
    if (n_addr - a0 != exp_addr) begin
      failures++;
      $display("FAIL: %s: %0d address blocks, expected %0d", name, n_addr - a0, exp_addr);
    end
    $display("%s: %0d cycles", name, cyc);
  endtask

  initial begin
    valid_i = 0; version = 32'h13;
    pwd = {"password", 192'd0}; pwd_len = 8;
    salt = {"somesalt", 64'd0}; salt_len = 8;
    key = '0; key_len = 0; ad = '0; ad_len = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    lanes = 1; tag_len = 32; mem_kib = 1024; passes = 2; typ = 2;
    run("Argon2id m=1024", 256'hec57ec9c0eaf51eeea2e92ffdcaa9cdee478f1927215b515b7b8d66657f41ed9, 4);
    lanes = 2; passes = 1; typ = 1;
    run("Argon2i m=1024", 256'h9159a187a45f071fc5aa7323616f6dbe303f3eef8a40e024688906f5d87b5f27, 8);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
