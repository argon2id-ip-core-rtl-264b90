// argon2id_tb: end-to-end test of the Argon2 core at its default sizes.
//
// Hashes the standard Argon2 known-answer input (p = 4 lanes, T = 32, m =
// 32 KiB, t = 3 passes, version 0x13, password 32 x 0x01, salt 16 x 0x02,
// key 8 x 0x03, associated data 12 x 0x04) as Argon2id, Argon2d and
// Argon2i and compares each tag with the published value. A fourth request
// with a too-short salt must come back with error_o. The test also counts
// how often the core's mechanisms fired (address-block generation,
// data-dependent indexing, references into other lanes, xor write-back of
// later passes, chained H' pieces, one compressed_ready_o per block) and
// fails any that never did, and it checks the number of compressed blocks
// against the work the parameters imply: 32 blocks per pass less the 8
// initial ones, so 24 + 32 + 32 = 88 per hash. With 8 blocks per lane a
// segment is 2 blocks long, so the first segment of each lane is empty.
module argon2id_tb;
  import argon2_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         valid_i;
  logic [255:0] pwd;
  logic [127:0] salt;
  logic [255:0] key;
  logic [95:0]  ad;
  logic [31:0]  pwd_len, salt_len, key_len, ad_len, lanes, tag_len, mem_kib, passes, version, typ;
  logic         valid_o, error_o, cready, busy;
  logic [255:0] tag;

  argon2id dut (
    .clk_i(clk), .rst_ni(rst_n), .valid_i(valid_i),
    .pwd_i(pwd), .pwd_len_i(pwd_len), .salt_i(salt), .salt_len_i(salt_len),
    .key_i(key), .key_len_i(key_len), .ad_i(ad), .ad_len_i(ad_len),
    .lanes_i(lanes), .tag_len_i(tag_len), .mem_kib_i(mem_kib), .passes_i(passes),
    .version_i(version), .type_i(typ),
    .valid_o(valid_o), .error_o(error_o), .tag_o(tag), .compressed_ready_o(cready), .busy_o(busy)
  );

  int checks = 0, failures = 0;
  int n_addr = 0, n_dep = 0, n_cross = 0, n_xorwb = 0, n_chain = 0, n_cready = 0, n_g = 0;

  always @(posedge clk) if (rst_n) begin
    if (dut.g_clear) n_addr++;
    if (dut.ix_start && !dut.di_q) n_dep++;
    if (dut.ix_done && dut.ix_lane != dut.lane_q) n_cross++;
    if (dut.last_of_wb && dut.pass_q != 0) n_xorwb++;
    if (dut.u_hp.out_valid_o && !dut.u_hp.final_q) n_chain++;
    if (cready) n_cready++;
    if (dut.u_g.done_o) n_g++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic run(input logic [31:0] y, input logic [31:0] slen, output logic [255:0] t,
                     output logic err, output int cycles);
    @(negedge clk);
    typ = y; salt_len = slen;
    valid_i = 1'b1;
    @(negedge clk);
    valid_i = 1'b0;
    cycles = 1;
    while (!valid_o) begin
      @(negedge clk);
      cycles++;
    end
    t = tag; err = error_o;
  endtask

  localparam logic [255:0] TAG_ID = 256'h0d640df58d78766c08c037a34a8b53c9d01ef0452d75b65eb52520e96b01e659;
  localparam logic [255:0] TAG_D  = 256'h512b391b6f1162975371d30919734294f868e3be3984f3c1a13a4db9fabe4acb;
  localparam logic [255:0] TAG_I  = 256'hc814d9d1dc7f37aa13f0d77f2494bda1c8de6b016dd388d29952a4c4672b6ce8;

  initial begin
    logic [255:0] t;
    logic err;
    int cyc, a0, c0;
    valid_i = 1'b0;
    pwd = {32{8'h01}}; salt = {16{8'h02}}; key = {{8{8'h03}}, 192'd0}; ad = {12{8'h04}};
    pwd_len = 32; salt_len = 16; key_len = 8; ad_len = 12;
    lanes = 4; tag_len = 32; mem_kib = 32; passes = 3; version = 32'h13; typ = 2;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    a0 = n_addr; c0 = n_cready;
    run(2, 16, t, err, cyc);
    $display("Argon2id tag %h, %0d cycles", t, cyc);
    check(!err && t == TAG_ID, "Argon2id tag");
    // Argon2id: pass 0, slice 1 uses one address block per lane (slice 0 is empty)
    check(n_addr - a0 == 4, $sformatf("Argon2id address blocks %0d", n_addr - a0));
    check(n_cready - c0 == 88, $sformatf("Argon2id compressed blocks %0d", n_cready - c0));
    check(cyc > 50000 && cyc < 150000, $sformatf("Argon2id cycle count %0d", cyc));

    a0 = n_addr;
    run(0, 16, t, err, cyc);
    $display("Argon2d  tag %h, %0d cycles", t, cyc);
    check(!err && t == TAG_D, "Argon2d tag");
    check(n_addr - a0 == 0, "Argon2d uses no address blocks");

    a0 = n_addr;
    run(1, 16, t, err, cyc);
    $display("Argon2i  tag %h, %0d cycles", t, cyc);
    check(!err && t == TAG_I, "Argon2i tag");
    // Argon2i: every non-empty segment (3 x 4 x 4 less 4) starts a new address block
    check(n_addr - a0 == 44, $sformatf("Argon2i address blocks %0d", n_addr - a0));

    run(2, 4, t, err, cyc);
    check(err == 1'b1 && cyc < 10, "short salt rejected");

    check(n_addr > 0,   "address-block generation happened");
    check(n_dep > 0,    "data-dependent indexing happened");
    check(n_cross > 0,  "reference into another lane happened");
    check(n_xorwb > 0,  "xor write-back in later passes happened");
    check(n_chain > 0,  "chained H' pieces happened");
    check(n_cready == n_g - 2 * n_addr, "one compressed_ready per block");
    $display("events: addr=%0d dep=%0d cross=%0d xorwb=%0d chain=%0d cready=%0d",
             n_addr, n_dep, n_cross, n_xorwb, n_chain, n_cready);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
