// cfa: configurable full adder, one bit slice of the one-level CCSA.
//
// With alpha = 1 the cell is a full adder over (ss, sc, x): it is one bit of
// a three-input carry-save addition (1F_CSA). With alpha = 0 it is the second
// half adder of two serial half adders (2H_CSA): the third input is then the
// carry of the first half adder of the bit below (hc_in = ss & sc of bit j-1,
// the gate the block diagram calls G2, placed in the cell above), and the
// full adder's generate term ss & sc is suppressed. The cell also produces
// its own first-half-adder carry, hc_out = ss & sc, for the cell above.
//
// The x operand arrives inverted (x_n), as the simplified multiplexer SM3
// delivers it; the cell re-inverts it inside its alpha multiplexer. The
// split into a propagate term (G1), a sum term (G3) and a carry built from
// the alpha-gated generate term and the propagate-and-third term (G4, G5)
// follows the cell's published structure; the Boolean form of each node is
// this design's own. Purely combinational.
module cfa (
  input  logic alpha,   // 1: full adder, 0: second serial half adder
  input  logic ss,      // sum-word bit from M2
  input  logic sc,      // carry-word bit from M1
  input  logic x_n,     // inverted third operand bit from SM3
  input  logic hc_in,   // first-half-adder carry from bit j-1 (G2 of this cell)
  output logic hc_out,  // first-half-adder carry of this bit, to bit j+1
  output logic s,       // sum bit (to SS register bit j)
  output logic c        // carry bit (to SC register bit j+1)
);

  logic p;     // G1: ss ^ sc
  logic t;     // third input after the alpha multiplexer
  logic g_n;   // inverted generate term, forced high in half-adder mode
  logic pt_n;  // G4: inverted propagate-and-third term

  always_comb begin
    p      = ss ^ sc;
    t      = alpha ? ~x_n : hc_in;
    g_n    = ~(alpha & ss & sc);
    pt_n   = ~(p & t);
    s      = p ^ t;         // G3
    c      = ~(g_n & pt_n); // G5
    hc_out = ss & sc;       // G2 of the cell above
  end

endmodule
