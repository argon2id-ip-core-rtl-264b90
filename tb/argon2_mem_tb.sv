// argon2_mem_tb: writes a pseudo-random pattern to every word of the block
// memory, reads it back in another order and checks the data and the
// one-cycle read latency, then checks that a read and a write to the same
// address in one cycle return the old word.
module argon2_mem_tb;
  import argon2_pkg::*;
  localparam int unsigned MB = 4;
  localparam int unsigned AW = $clog2(MB * 128);
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic we, re;
  logic [AW-1:0] wa, ra;
  word_t wd, rd;
  int checks = 0, failures = 0;

  argon2_mem #(.MAX_BLOCKS(MB)) dut (.clk_i(clk), .we_i(we), .waddr_i(wa), .wdata_i(wd),
                                    .re_i(re), .raddr_i(ra), .rdata_o(rd));

  function automatic word_t pat(int a);
    return {32'(a) * 32'h9E3779B9, ~(32'(a) * 32'h85EBCA6B)};
  endfunction

  initial begin
    we = 0; re = 0; wa = '0; ra = '0; wd = '0;
    @(negedge clk);
    for (int a = 0; a < int'(MB * 128); a++) begin
      we = 1; wa = AW'(a); wd = pat(a);
      @(negedge clk);
    end
    we = 0;
    for (int n = 0; n < int'(MB * 128); n++) begin
      int a = (n * 37 + 5) % int'(MB * 128);
      re = 1; ra = AW'(a);
      @(negedge clk);
      re = 0;
      checks++;
      if (rd !== pat(a)) begin failures++; $display("FAIL: read %0d", a); end
    end
    // read-during-write returns the old word
    re = 1; we = 1; ra = AW'(9); wa = AW'(9); wd = 64'h1234;
    @(negedge clk);
    re = 0; we = 0;
    checks++;
    if (rd !== pat(9)) begin failures++; $display("FAIL: read during write"); end
    re = 1; ra = AW'(9);
    @(negedge clk);
    re = 0;
    checks++;
    if (rd !== 64'h1234) begin failures++; $display("FAIL: write not stored"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
