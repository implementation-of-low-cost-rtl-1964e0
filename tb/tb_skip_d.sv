// tb_skip_d: exhaustive test of the skip detector against a bit-level
// addition. For every low-bit pattern of SS[i], SC[i] that the multiplier can
// present (q-hat = SS0 ^ SC0), x[2:0] = q-hat ? {N2, 0, 1} : 0 is added with a
// real three-input carry-save addition and halved; the expected outputs are
// q(i+1) = parity of the new pair, skip = no A(i+1) and both new low bits
// zero (and skip_en), q(i+2) = parity after one more halving.
module tb_skip_d;
  logic       n2, q_hat, a1, a2, skip_en, skip, q_next, a_next;
  logic [2:0] ss, sc;
  int checks = 0, failures = 0;
  int n_skip = 0;

  skip_d dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0] x;
    logic [3:0] sum, car;
    logic [2:0] ss1, sc1;
    logic       want_skip, want_q, want_a;
    for (int v = 0; v < 2048; v++) begin
      {n2, ss, sc, a1, a2, skip_en, q_hat} = 11'(v);
      if (q_hat != (ss[0] ^ sc[0])) continue;
      x   = q_hat ? {n2, 2'b01} : 3'b000;
      sum = 4'(ss ^ sc ^ x);
      car = 4'((ss & sc) | (ss & x) | (sc & x)) << 1;
      ss1 = sum[3:1];
      sc1 = car[3:1];
      want_skip = skip_en && !a1 && !ss1[0] && !sc1[0];
      want_q    = want_skip ? (ss1[1] ^ sc1[1]) : (ss1[0] ^ sc1[0]);
      want_a    = want_skip ? a2 : a1;
      #1;
      checks++;
      if (skip !== want_skip || q_next !== want_q || a_next !== want_a) begin
        failures++;
        $display("FAIL v=%b skip=%b/%b q=%b/%b a=%b/%b", v[10:0], skip, want_skip,
                 q_next, want_q, a_next, want_a);
      end
      if (want_skip) n_skip++;
    end
    checks++;
    if (n_skip == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
