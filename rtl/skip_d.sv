// skip_d: skip detector with quotient precomputation.
//
// In iteration i the CCSA forms (SS[i] + SC[i] + x) where x was chosen by the
// stored q-hat = q_i and A-hat = A_i. From the three low bits of SS[i] and
// SC[i] this block predicts, in parallel with that addition:
//   q(i+1)    = (SS1 ^ SC1) ^ (SS0 | SC0)
//   q(i+2)    = (N2 & q-hat) ^ (SS2 ^ SC2) ^ (SS1 & SC1)
//   skip(i+1) = ~(A(i+1) | (SS1 ^ SC1) | (SS0 | SC0))
// skip(i+1) = 1 means iteration i+1 adds zero to an even carry-save pair with
// both low bits zero, so it reduces to a plain halving that can be folded
// into the shift of the next cycle. The block then stores either
// (q(i+1), A(i+1)) or (q(i+2), A(i+2)) as the next q-hat and A-hat.
//
// The equations rely on B-hat = B << 3 (so B-hat[2:0] = 0 and D-hat[2:0] =
// N-hat[2:0]), on N-hat[0] = 1 and on N-hat[1] = 0; then x[1] = 0 and
// x[2] = N-hat[2] & q-hat, and only N-hat[2] enters the block. The inputs,
// the four XORs, the NOR and the two 2-to-1 multiplexers follow the published
// detector; the equations themselves, and the OR in the bit-0 carry term, are
// derived here from the carry-save arithmetic. skip_en is this design's
// addition: the controller
// drops it in the last iteration, where a skip would halve once too often.
// Combinational; the three flip-flops sit in the multiplier top.
module skip_d (
  input  logic       n2,      // N-hat bit 2
  input  logic       q_hat,   // stored q_i
  input  logic [2:0] ss,      // SS[i][2:0] from M5
  input  logic [2:0] sc,      // SC[i][2:0] from M4
  input  logic       a1,      // A(i+1)
  input  logic       a2,      // A(i+2)
  input  logic       skip_en, // 0 in the last iteration
  output logic       skip,    // skip(i+1)
  output logic       q_next,  // next q-hat
  output logic       a_next   // next A-hat
);

  logic p1;     // SS[i+1][0] = SS1 ^ SC1
  logic c0;     // SC[i+1][0] = SS0 | SC0
  logic q_i1;   // q(i+1)
  logic q_i2;   // q(i+2)

  always_comb begin
    p1     = ss[1] ^ sc[1];
    c0     = ss[0] | sc[0];
    q_i1   = p1 ^ c0;
    q_i2   = (n2 & q_hat) ^ (ss[2] ^ sc[2]) ^ (ss[1] & sc[1]);
    skip   = ~(a1 | p1 | c0) & skip_en;
    q_next = skip ? q_i2 : q_i1;
    a_next = skip ? a2 : a1;
  end

endmodule
