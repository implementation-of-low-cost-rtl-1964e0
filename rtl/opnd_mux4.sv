// opnd_mux4: W-bit 4-to-1 operand multiplexer, used as M1 (carry word) and
// M2 (sum word) in front of the CCSA.
//
// It passes the register value unshifted (two-input additions), shifted right
// by one bit (the delayed halving of a normal iteration), shifted right by two
// bits (the halving of a normal iteration plus that of a skipped one), or the
// load operand (N-hat for M1, B-hat for M2, for the first addition
// B-hat + N-hat). The select comes from the controller. Combinational.
module opnd_mux4
  import mm_pkg::*;
#(
  parameter int unsigned W = 1029
) (
  input  opsel_e       sel,
  input  logic [W-1:0] r,     // SS or SC register
  input  logic [W-1:0] ld,    // B-hat or N-hat
  output logic [W-1:0] y
);

  always_comb begin
    unique case (sel)
      OPSEL_REG:  y = r;
      OPSEL_SHR1: y = r >> 1;
      OPSEL_SHR2: y = r >> 2;
      default:    y = ld;
    endcase
  end

endmodule
