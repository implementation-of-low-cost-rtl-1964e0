// tb_scs_mm_new: end-to-end test of the SCS-MM-New multiplier at K = 61.
//
// Runs directed corner cases and random multiplications. Every result is
// compared bit-exactly with the word-level reference model (mm_ref_pkg) and
// checked for the Montgomery congruence res * 2^(K+2) = A * B modulo N-hat
// (and modulo N where N-hat = 3N). The start-to-done latency must equal
// n_pre + n_iter + n_post + 3 cycles as predicted by the model, and the
// number of skip_taken pulses must equal the model's skip count. The test
// fails if any of these mechanisms never occurs: a skipped iteration, a
// skip refused in the last iteration, a precomputation and a final
// conversion needing more than one two-half-adder step, N-hat = 3N, and a
// full-length carry chain in the precomputation, a start pulse (with other
// operands) while busy, which must be ignored. For every product the
// two-half-adder loops must take at most half (plus one) of the steps a plain
// one-level CSA would need for the same carry-save pair.
module tb_scs_mm_new;
  import mm_ref_pkg::*;

  localparam int K = 61;  // odd: the refused last-iteration skip is reachable only for odd K
  localparam int NRAND = 400;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         start = 1'b0;
  logic [K-1:0] a_in = '0, b_in = '0, n_hat_in = '0;
  logic         busy, done, skip_taken;
  logic [K:0]   result;

  int checks = 0, failures = 0;
  int skip_raw = 0;  // skip_taken pulses seen at clock edges
  int ev_busy_start = 0, ev_long_chain = 0, ev_skip = 0, ev_lastnoskip = 0, ev_pre_multi = 0, ev_post_multi = 0, ev_triple = 0;

  scs_mm_new #(.K(K)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (skip_taken) skip_raw++;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
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

  task automatic run_one(input big_t a, input big_t b, input big_t nh, input big_t n);
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
      // every 7th product: a second start with other operands while busy
      if (cyc == 10 && (checks / 10) % 7 == 3 && busy) begin
        a_in = ~a_in; b_in = ~b_in; start = 1'b1;
        @(posedge clk);
        cyc++;
        #1 start = 1'b0;
        ev_busy_start++;
      end
    end while (!done);
    skips = skip_raw - skips;
    check($sformatf("result a=%h b=%h nh=%h: got %h want %h", a, b, nh, result, r.res[K:0]),
          big_t'(result) == r.res);
    check("congruence mod N-hat", congruent(big_t'(result), a, b, nh, K));
    check("congruence mod N", congruent(big_t'(result), a, b, n, K));
    check("result below 2^(K+1)", r.res < (big_t'(1) << (K + 1)));
    check($sformatf("latency got %0d want %0d", cyc, r.n_pre + r.n_iter + r.n_post + 3),
          cyc == r.n_pre + r.n_iter + r.n_post + 3);
    check($sformatf("skips got %0d want %0d", skips, r.n_skip), skips == r.n_skip);
    check("iterations + skips = K+6", r.n_iter + r.n_skip == K + 6);
    check("busy low after done", !busy);
    check("2H precompute at most half the plain-CSA steps (+1)", r.n_pre <= r.n_pre_plain / 2 + 1);
    check("2H conversion at most half the plain-CSA steps (+1)", r.n_post <= r.n_post_plain / 2 + 1);
    if (r.n_pre > K / 4) ev_long_chain++;
    if (r.n_skip > 0) ev_skip++;
    if (r.n_lastnoskip > 0) ev_lastnoskip++;
    if (r.n_pre > 1) ev_pre_multi++;
    if (r.n_post > 1) ev_post_multi++;
    if (nh != n) ev_triple++;
  endtask

  // Random odd modulus N below 2^(K-2); N-hat = N or 3N so that N-hat = 1 mod 4.
  task automatic run_rand(input int nbits_a);
    big_t a, b, n, nh;
    n = rand_big(K - 2) | 1;
    n[K-3] = 1'b1;
    nh = (n[1] == 1'b0) ? n : 3 * n;
    a = rand_big(nbits_a);
    b = rand_big(K);
    run_one(a, b, nh, n);
  endtask


  initial begin
    big_t ones, nmax;
    ones = (big_t'(1) << K) - 1;
    nmax = ones - 2;  // 2^K - 3, = 1 mod 4
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    // With A = 0 every executed iteration has odd index i, so for odd K the
    // last iteration i = K+4 passes the skip test and must be refused.
    run_one('0, '0, nmax, nmax);
    run_one(ones, ones, nmax, nmax);
    run_one(ones, '0, nmax, nmax);
    run_one('0, ones, nmax, nmax);
    run_one(1, 1, 5, 5);
    run_one(ones, ones, 1, 1);
    run_one(ones, big_t'(1) << (K - 1), 13, 13);
    // Worst-case carry chains: B-hat + N-hat = (2^K - 8) + 9 ripples through
    // every bit of the precomputation.
    run_one(ones, ones >> 3, 9, 9);
    run_one(ones >> 1, ones >> 3, 9, 3);
    for (int t = 0; t < NRAND; t++) run_rand((t % 4 == 0) ? (K / 2) : K);
    check("skip seen", ev_skip > 0);
    check("last-iteration skip refused seen", ev_lastnoskip > 0);
    check("multi-step precomputation seen", ev_pre_multi > 0);
    check("multi-step conversion seen", ev_post_multi > 0);
    check("N-hat = 3N seen", ev_triple > 0);
    check("full-length precompute carry chain seen", ev_long_chain > 0);
    check("start while busy seen", ev_busy_start > 0);
    $display("events: long_chain=%0d busy_start=%0d", ev_long_chain, ev_busy_start);
    $display("events: skip=%0d lastnoskip=%0d pre_multi=%0d post_multi=%0d triple=%0d skip_pulses=%0d",
             ev_skip, ev_lastnoskip, ev_pre_multi, ev_post_multi, ev_triple, skip_raw);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
