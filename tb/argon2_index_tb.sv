// argon2_index_tb: checks the indexing function against a model of the
// Argon2 reference-set rules written here, for 3000 random positions over
// random lane counts (1..40) and segment lengths, covering pass 0 and later
// passes, all slices, the first block of a segment, the same lane and other
// lanes. Each result must also lie in the lane and inside the lane length,
// and done_o must come 34 cycles after start_i.
module argon2_index_tb;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start, done;
  logic [63:0] pr;
  logic [31:0] pass, lane, index, lanes, seglen, q, rlane, rcol;
  logic [1:0] slice;
  int checks = 0, failures = 0;
  int n_same = 0, n_other = 0, n_first = 0;

  argon2_index dut (.clk_i(clk), .rst_ni(rst_n), .start_i(start), .pseudo_i(pr),
    .pass_i(pass), .slice_i(slice), .lane_i(lane), .index_i(index), .lanes_i(lanes),
    .seglen_i(seglen), .q_i(q), .done_o(done), .ref_lane_o(rlane), .ref_col_o(rcol));

  function automatic void model(output longint el, output longint ec);
    longint area, x, rel, st, l;
    l = (pass == 0 && slice == 0) ? longint'(lane) : longint'(pr[63:32]) % longint'(lanes);
    if (pass == 0) begin
      if (slice == 0)     area = index - 1;
      else if (l == lane) area = slice * seglen + index - 1;
      else                area = slice * seglen - (index == 0 ? 1 : 0);
    end else begin
      if (l == lane)      area = q - seglen + index - 1;
      else                area = q - seglen - (index == 0 ? 1 : 0);
    end
    x   = (longint'(pr[31:0]) * longint'(pr[31:0])) >>> 32;
    x   = longint'(64'(x) & 64'hffffffff);
    rel = area - 1 - longint'((64'(area) * 64'(x)) >> 32);
    st  = (pass != 0 && slice != 3) ? (slice + 1) * seglen : 0;
    el  = l;
    ec  = (st + rel) % q;
  endfunction

  initial begin
    longint el, ec;
    int lat;
    start = 0; pr = 0; pass = 0; slice = 0; lane = 0; index = 0; lanes = 1; seglen = 2; q = 8;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      lanes  = 1 + $urandom % 40;
      seglen = 2 + $urandom % 300;
      q      = 4 * seglen;
      pass   = ($urandom % 2) ? 0 : 1 + $urandom % 5;
      slice  = 2'($urandom);
      lane   = $urandom % lanes;
      index  = (pass == 0 && slice == 0) ? 2 + $urandom % (seglen - 1) : $urandom % seglen;
      if (pass == 0 && slice == 0 && index >= seglen) index = seglen - 1;
      if (pass == 0 && slice == 0 && index < 2) continue;
      pr     = {$urandom, $urandom};
      if (n % 7 == 0) pr[63:32] = 32'(lane);   // force the same lane now and then
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      lat = 1;
      while (!done) begin @(negedge clk); lat++; end
      model(el, ec);
      if (index == 0) n_first++;
      if (el == lane) n_same++; else n_other++;
      checks++;
      if (rlane != 32'(el) || rcol != 32'(ec)) begin
        failures++;
        if (failures < 10)
          $display("FAIL: pass %0d slice %0d lane %0d/%0d index %0d seg %0d: got %0d/%0d exp %0d/%0d",
                   pass, slice, lane, lanes, index, seglen, rlane, rcol, el, ec);
      end
      checks++;
      if (rlane >= lanes || rcol >= q) begin failures++; $display("FAIL: out of range"); end
      checks++;
      if (lat != 34) begin failures++; if (failures < 10) $display("FAIL: latency %0d", lat); end
    end
    checks++;
    if (n_same == 0 || n_other == 0 || n_first == 0) begin
      failures++; $display("FAIL: coverage same=%0d other=%0d first=%0d", n_same, n_other, n_first);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
