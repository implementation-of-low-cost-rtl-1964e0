// tb_scs_mm_new_full: the multiplier at its default size, K = 1024 bits.
//
// One product with a full-length carry chain in the precomputation
// (B-hat + N-hat = (2^K - 8) + 9), then a few complete multiplications with a
// 1022-bit odd modulus N (N-hat = N or 3N), including back-to-back operations where the result of one product is
// fed back as an operand (Montgomery-domain reuse, masked to K bits). Each
// result is compared with the word-level reference model, checked for the
// congruence res * 2^(K+2) = A * B (mod N), and the start-to-done latency is
// compared with the model's cycle count; both two-half-adder loops must need
// at most half (plus one) of the steps of a plain one-level CSA.
module tb_scs_mm_new_full;
  import mm_ref_pkg::*;

  localparam int K = 1024;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         start = 1'b0;
  logic [K-1:0] a_in = '0, b_in = '0, n_hat_in = '0;
  logic         busy, done, skip_taken;
  logic [K:0]   result;

  int checks = 0, failures = 0;
  int skip_raw = 0;

  scs_mm_new dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (skip_taken) skip_raw++;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic big_t rand_big(input int bits);
    big_t v = '0;
    for (int j = 0; j < bits; j += 32) v[j +: 32] = $urandom();
    return v & ((big_t'(1) << bits) - 1);
  endfunction

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic run_one(input big_t a, input big_t b, input big_t nh, input big_t n,
                         output big_t res);
    ref_t r;
    int   cyc, skips;
    r = run(a, b, nh, K);
    @(negedge clk);
    a_in = a[K-1:0]; b_in = b[K-1:0]; n_hat_in = nh[K-1:0];
    start = 1'b1;
    @(posedge clk);
    #1 start = 1'b0;
    cyc = 0;
    skips = skip_raw;
    do begin
      @(posedge clk);
      cyc++;
      #1;
    end while (!done);
    skips = skip_raw - skips;
    res = big_t'(result);
    check("result equals model", res == r.res);
    check("congruence mod N", congruent(res, a, b, n, K));
    check($sformatf("latency got %0d want %0d", cyc, r.n_pre + r.n_iter + r.n_post + 3),
          cyc == r.n_pre + r.n_iter + r.n_post + 3);
    check("skip count", skips == r.n_skip);
    check("2H loops at most half the plain-CSA steps (+1)",
          r.n_pre <= r.n_pre_plain / 2 + 1 && r.n_post <= r.n_post_plain / 2 + 1);
    $display("K=%0d: %0d cycles (precompute %0d [plain CSA %0d], iterations %0d, skipped %0d, conversion %0d [plain CSA %0d])",
             K, cyc, r.n_pre, r.n_pre_plain, r.n_iter, r.n_skip, r.n_post, r.n_post_plain);
  endtask

  initial begin
    big_t n, nh, a, b, p;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    // worst-case precomputation chain: B-hat + N-hat = (2^K - 8) + 9
    n = 3;
    run_one((big_t'(1) << K) - 1, ((big_t'(1) << K) - 1) >> 3, 9, n, p);
    for (int t = 0; t < 3; t++) begin
      n = rand_big(K - 2) | 1;
      n[K-3] = 1'b1;
      nh = (n[1] == 1'b0) ? n : 3 * n;
      a = rand_big(K);
      b = rand_big(K);
      run_one(a, b, nh, n, p);
      // chain: square the product (kept to K bits, as the operand ports are)
      p = p & ((big_t'(1) << K) - 1);
      run_one(p, p, nh, n, p);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
