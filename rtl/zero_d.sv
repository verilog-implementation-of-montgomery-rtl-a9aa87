// zero_d: zero detector on the carry register SC (Zero_D).
//
// Precomputation of D = B + N and the final format conversion both repeat
// the carry-save addition (SS, SC) = SS + SC + 0 until SC is zero; at that
// point SS alone holds the binary value. This block flags that condition.
// A plain W-input NOR; purely combinational.
module zero_d #(
  parameter int unsigned W = 7
) (
  input  logic [W-1:0] sc,
  output logic         zero
);
  always_comb zero = (sc == '0);
endmodule
