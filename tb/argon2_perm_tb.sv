// argon2_perm_tb: checks the permutation P (BLAKE2b round with the
// multiply-add mixing) against a model written here, on 1000 random inputs,
// and against a known answer for the input v[k] = k computed with an
// independent software implementation of Argon2.
module argon2_perm_tb;
  import argon2_pkg::*;
  word_t vi [16], vo [16];
  int checks = 0, failures = 0;

  argon2_perm dut (.v_i(vi), .v_o(vo));

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
  task automatic model(ref word_t v [16]);
    gb(v, 0, 4, 8, 12); gb(v, 1, 5, 9, 13); gb(v, 2, 6, 10, 14); gb(v, 3, 7, 11, 15);
    gb(v, 0, 5, 10, 15); gb(v, 1, 6, 11, 12); gb(v, 2, 7, 8, 13); gb(v, 3, 4, 9, 14);
  endtask

  localparam word_t KAT [16] = '{
    64'h3bce1ccd56d0db35, 64'h92fd98e3a24f70b4, 64'h3845ecf7791b8e89, 64'ha920b275b5a7d5f7,
    64'h60fa2a84ac4f1571, 64'ha5feebc3465becf6, 64'h6b1b2cd05ad5461a, 64'h632b8ec35cceef08,
    64'hbb0c7d539613c94b, 64'h7ce048bb910f8c63, 64'hdbf94bf83b0da4d7, 64'he70eab96511821ba,
    64'heba9f9fa9db0b60c, 64'h4c1d95d18ef2a267, 64'hc1b8941b9bba8ba2, 64'h4c1b185e3a641fc4};

  initial begin
    word_t m [16];
    for (int k = 0; k < 16; k++) vi[k] = word_t'(k);
    #1;
    for (int k = 0; k < 16; k++) begin
      checks++;
      if (vo[k] !== KAT[k]) begin failures++; $display("FAIL: KAT word %0d", k); end
    end
    for (int n = 0; n < 1000; n++) begin
      for (int k = 0; k < 16; k++) vi[k] = {$urandom, $urandom};
      #1;
      m = vi;
      model(m);
      checks++;
      if (vo != m) begin
        failures++;
        if (failures < 5) $display("FAIL: random vector %0d", n);
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
