// sm3: simplified 4-to-1 multiplexer that picks the third CSA operand.
//
// It returns the inverse of x, where x = 0, N-hat, B-hat or D-hat for
// (A-hat, q-hat) = 00, 01, 10, 11. Because one of the four inputs is zero,
// the N-hat leg is only gated by q-hat (written here as ~(N-hat & q-hat),
// which is already inverted), B-hat/D-hat share a 2-to-1 multiplexer steered
// by q-hat, and a last 2-to-1 multiplexer steered by A-hat picks between the
// two. This split follows the published simplified multiplexer; the inverted
// output goes straight into the CFA cells.
// Purely combinational.
module sm3 #(
  parameter int unsigned W = 1029
) (
  input  logic         q_hat,  // precomputed quotient bit
  input  logic         a_hat,  // precomputed multiplier bit
  input  logic [W-1:0] n_hat,
  input  logic [W-1:0] b_hat,
  input  logic [W-1:0] d_hat,
  output logic [W-1:0] x_n     // ~x
);

  logic [W-1:0] n_leg_n;  // ~(N-hat & q-hat)
  logic [W-1:0] bd_leg;   // q-hat ? D-hat : B-hat

  always_comb begin
    n_leg_n = ~(n_hat & {W{q_hat}});
    bd_leg  = q_hat ? d_hat : b_hat;
    x_n     = a_hat ? ~bd_leg : n_leg_n;
  end

endmodule
