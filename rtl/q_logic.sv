// q_logic: quotient bit of one Montgomery iteration (Q_L).
//
// The iteration adds S + a_i*B + q_i*N and then halves the sum, so q_i must
// make that sum even. N is odd, hence q_i is the parity of S + a_i*B. S is
// held in carry-save form, and since the adder sees the registers after the
// deferred right shift, the parity of S is the XOR of the two shifted
// vectors' low bits: q_i = ss_lsb ^ sc_lsb ^ (a_i & b_0). The block is only
// named in the source; this is the textbook radix-2 rule.
//
// Interface: single bits, purely combinational.
module q_logic (
  input  logic ss_lsb,  // bit 0 of the M2 output (SS >> 1)
  input  logic sc_lsb,  // bit 0 of the M1 output (SC >> 1)
  input  logic a_i,     // current multiplier bit
  input  logic b_0,     // bit 0 of B
  output logic q_i
);
  always_comb q_i = ss_lsb ^ sc_lsb ^ (a_i & b_0);
endmodule
