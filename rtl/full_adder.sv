// full_adder: one-bit full adder, the cell the carry-save adder repeats per
// bit. s = a ^ b ^ cin, c = majority(a, b, cin). Purely combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic c
);
  always_comb begin
    s = a ^ b ^ cin;
    c = (a & b) | (a & cin) | (b & cin);
  end
endmodule
