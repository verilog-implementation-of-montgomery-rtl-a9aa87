// half_adder: one-bit half adder used in the two-half-adder configuration of
// the carry-save adder. s = a ^ b, c = a & b. Purely combinational.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic c
);
  always_comb begin
    s = a ^ b;
    c = a & b;
  end
endmodule
