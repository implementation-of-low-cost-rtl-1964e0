// ccsa: one-level configurable carry-save adder, W cells of cfa.
//
// alpha = 1 (1F_CSA): s + c = ss + sc + x, one three-input carry-save
// addition with a single full-adder delay.
// alpha = 0 (2H_CSA): s + c = ss + sc, computed as two serial two-input
// carry-save additions in the same cells. Each pass through two half-adder
// levels shortens the longest pending carry chain by two bits, which halves
// the cycles needed to resolve a carry-save pair into binary compared with a
// plain CSA adding zero.
//
// Outputs are unshifted: s is the sum word and c is the carry word already
// placed at its weight (bit 0 is always zero); the right shift of the
// Montgomery step is applied by M1/M2 in the next cycle. The carry out of the
// top cell is dropped: the multiplier's operand bounds keep every sum below
// 2^W. x arrives inverted from SM3. Purely combinational.
module ccsa #(
  parameter int unsigned W = 1029  // datapath width, K + 5
) (
  input  logic         alpha,
  input  logic [W-1:0] ss,    // from M2
  input  logic [W-1:0] sc,    // from M1
  input  logic [W-1:0] x_n,   // inverted third operand, from SM3
  output logic [W-1:0] s,     // new SS
  output logic [W-1:0] c      // new SC
);

  logic [W-1:0] hc;       // first-half-adder carry out of each bit
  logic [W-1:0] hc_prev;  // the same, moved up one bit (G2 of the cell above)
  logic [W-1:0] cout;     // carry out of each bit

  assign hc_prev = {hc[W-2:0], 1'b0};

  for (genvar j = 0; j < W; j++) begin : g_cell
    cfa u_cfa (
      .alpha (alpha),
      .ss    (ss[j]),
      .sc    (sc[j]),
      .x_n   (x_n[j]),
      .hc_in (hc_prev[j]),
      .hc_out(hc[j]),
      .s     (s[j]),
      .c     (cout[j])
    );
  end

  assign c = {cout[W-2:0], 1'b0};

endmodule
