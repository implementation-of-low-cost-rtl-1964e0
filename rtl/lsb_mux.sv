// lsb_mux: 3-bit 2-to-1 multiplexer (M4 for SC, M5 for SS).
//
// Delivers the three least significant bits of SS[i] or SC[i] to the skip
// detector. Because the halving of iteration i-1 is deferred, the register
// holds SS[i] shifted left by one (skip = 0) or two (skip = 1) bits; this
// multiplexer picks bits [3:1] or [4:2] accordingly. It is the narrow twin
// of M1/M2 and keeps the skip detector off their slower 4-to-1 path.
// Combinational.
module lsb_mux (
  input  logic       skip,  // skip flag stored in the previous iteration
  input  logic [4:0] r,     // bits [4:0] of the SS or SC register
  output logic [2:0] y      // SS[i][2:0] or SC[i][2:0]
);

  assign y = skip ? r[4:2] : r[3:1];

endmodule
