// blake2b_mix_tb: checks the BLAKE2b mixing function against a model of
// the eight add/xor/rotate steps written here, on 2000 random inputs and on
// the all-zero input.
module blake2b_mix_tb;
  import argon2_pkg::*;
  word_t a, b, c, d, x, y, ao, bo, co, do_;
  int checks = 0, failures = 0;

  blake2b_mix dut (.a_i(a), .b_i(b), .c_i(c), .d_i(d), .x_i(x), .y_i(y),
                   .a_o(ao), .b_o(bo), .c_o(co), .d_o(do_));

  function automatic word_t rr(word_t v, int n);
    return {v, v} >> n;
  endfunction

  task automatic model(input word_t a0, b0, c0, d0, x0, y0, output word_t r [4]);
    word_t va = a0, vb = b0, vc = c0, vd = d0;
    va = va + vb + x0; vd = rr(vd ^ va, 32); vc = vc + vd; vb = rr(vb ^ vc, 24);
    va = va + vb + y0; vd = rr(vd ^ va, 16); vc = vc + vd; vb = rr(vb ^ vc, 63);
    r = '{va, vb, vc, vd};
  endtask

  initial begin
    word_t r [4];
    for (int n = 0; n < 2001; n++) begin
      if (n == 0) {a, b, c, d, x, y} = '0;
      else begin
        a = {$urandom, $urandom}; b = {$urandom, $urandom}; c = {$urandom, $urandom};
        d = {$urandom, $urandom}; x = {$urandom, $urandom}; y = {$urandom, $urandom};
      end
      #1;
      model(a, b, c, d, x, y, r);
      checks++;
      if ({ao, bo, co, do_} != {r[0], r[1], r[2], r[3]}) begin
        failures++;
        if (failures < 5) $display("FAIL: mix mismatch at vector %0d", n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
