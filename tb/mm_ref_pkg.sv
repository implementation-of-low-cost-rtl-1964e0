// mm_ref_pkg: word-level reference model of the SCS-MM-New multiplication,
// used by the testbenches to predict results and cycle counts.
//
// The model keeps (SS, SC) as plain wide integers and applies the algorithm
// steps directly: sum / carry words of a three-input carry-save addition
// (a ^ b ^ c, majority << 1), the two-half-adder step, and the Montgomery
// recurrence with the quotient taken as the parity of the real carry-save
// pair. It does not share any code with the RTL. All values are MAXW bits.
package mm_ref_pkg;

  localparam int MAXW = 2304;
  typedef logic [MAXW-1:0] big_t;

  typedef struct {
    big_t res;       // binary result
    int   n_pre;     // 2H_CSA steps of the D-hat precomputation
    int   n_iter;    // iterations executed (cycles of the main loop)
    int   n_skip;    // iterations skipped
    int   n_post;    // 2H_CSA steps of the final conversion (at least 1)
    int   n_lastnoskip; // last iteration met the skip test but may not skip
    int   n_pre_plain;  // steps a plain one-level CSA (adding 0) would need
    int   n_post_plain; // the same for the final conversion
  } ref_t;

  // Steps of (s, c) <- 1F_CSA(s, c, 0) until c = 0.
  function automatic int plain_steps(input big_t s, input big_t c);
    big_t ns, nc;
    int n = 0;
    while (c != '0) begin
      csa3(s, c, '0, ns, nc);
      s = ns;
      c = nc;
      n++;
    end
    return n;
  endfunction

  function automatic void csa3(input big_t a, input big_t b, input big_t c,
                               output big_t s, output big_t cy);
    s  = a ^ b ^ c;
    cy = ((a & b) | (a & c) | (b & c)) << 1;
  endfunction

  function automatic void two_ha(inout big_t s, inout big_t c);
    big_t s1, c1;
    s1 = s ^ c;
    c1 = (s & c) << 1;
    s  = s1 ^ c1;
    c  = (s1 & c1) << 1;
  endfunction

  function automatic ref_t run(input big_t a, input big_t b, input big_t nh, input int k);
    ref_t r;
    big_t bh, dh, ss, sc, sum, car, x;
    logic q, ah;
    int   i;
    r = '{default: 0};
    bh = b << 3;
    csa3(bh, nh, '0, ss, sc);
    r.n_pre_plain = plain_steps(ss, sc);
    while (sc != '0) begin
      two_ha(ss, sc);
      r.n_pre++;
    end
    dh = ss;
    ss = '0; sc = '0; q = 1'b0; ah = 1'b0; i = -1;
    while (i <= k + 4) begin
      x = ah ? (q ? dh : bh) : (q ? nh : '0);
      csa3(ss, sc, x, sum, car);
      if (sum[0] ^ car[0]) $fatal(1, "reference: odd sum in iteration %0d", i);
      ss = sum >> 1;
      sc = car >> 1;
      r.n_iter++;
      if (a[i+1] == 1'b0 && ss[0] == 1'b0 && sc[0] == 1'b0 && i + 1 <= k + 4 && i + 1 >= 0) begin
        // iteration i+1 would add zero: fold it into a halving
        ss = ss >> 1;
        sc = sc >> 1;
        r.n_skip++;
        i += 2;
      end else begin
        if (i == k + 4 && a[i+1] == 1'b0 && ss[0] == 1'b0 && sc[0] == 1'b0)
          r.n_lastnoskip++;
        i += 1;
      end
      q  = ss[0] ^ sc[0];
      ah = (i <= k + 4 && i < MAXW) ? a[i] : 1'b0;
    end
    r.n_post_plain = plain_steps(ss, sc);
    two_ha(ss, sc);
    r.n_post = 1;
    while (sc != '0) begin
      two_ha(ss, sc);
      r.n_post++;
    end
    r.res = ss;
    return r;
  endfunction

  // Modular check: res * 2^(k+2) == a * b (mod m).
  function automatic logic congruent(input big_t res, input big_t a, input big_t b,
                                     input big_t m, input int k);
    big_t lhs, rhs;
    lhs = (res << (k + 2)) % m;
    rhs = (a * b) % m;
    return lhs == rhs;
  endfunction

endpackage
