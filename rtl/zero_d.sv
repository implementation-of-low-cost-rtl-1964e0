// zero_d: zero detector. One wide NOR over the carry word SC: z = 1 when SC
// is zero, meaning the carry-save pair (SS, SC) has been resolved and SS holds
// the binary sum. Used to end both format-conversion loops. Combinational.
module zero_d #(
  parameter int unsigned W = 1029
) (
  input  logic [W-1:0] sc,
  output logic         z
);

  assign z = ~|sc;

endmodule
