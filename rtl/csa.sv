// csa: one-level configurable carry-save adder (CCSA) of the multiplier.
//
// The adder never propagates a carry along the word: each bit position works
// on its own and the result is left as a sum vector ss and a carry vector sc
// with ss + sc equal to the sum of the inputs. sc is returned already aligned
// to its weight (the carry out of bit j is placed at bit j+1, sc[0] = 0).
//
// Two configurations, chosen by mode:
//   CSA_FA  : one full adder per bit, ss + sc = a + b + c. Used for the
//             multiply iterations, where c is the operand chosen by M3.
//   CSA_HA2 : two half adders in series per bit. The first adds a and b, the
//             second adds that sum bit to the first half adder's carry from
//             the bit below, so ss + sc = a + b and a carry chain shrinks by
//             two places per pass. c is ignored (it is zero whenever this
//             configuration is used: precomputation of B+N and format
//             conversion).
// The full-adder cell and the a/b/c, ss/sc port names follow the adder's
// block view in the source; the half-adder wiring is this design's reading of
// "one full-adder or two serial half-adders".
//
// Interface: W-bit vectors, purely combinational. The carry out of the top
// bit is dropped; the caller keeps every value below 2^(W-1) so none is lost.
module csa
  import mmm_pkg::*;
#(
  parameter int unsigned W = 7
) (
  input  csa_mode_e      mode,
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  input  logic [W-1:0]   c,
  output logic [W-1:0]   ss,
  output logic [W-1:0]   sc
);
  logic [W-1:0] fa_s, fa_c;    // full-adder configuration
  logic [W-1:0] h1_s, h1_c;    // first half adder
  logic [W-1:0] h2_s, h2_c;    // second half adder
  logic [W-1:0] h1_c_up;       // first half adder's carries at their weight

  assign h1_c_up = {h1_c[W-2:0], 1'b0};

  for (genvar j = 0; j < W; j++) begin : g_bit
    full_adder u_fa (.a(a[j]), .b(b[j]), .cin(c[j]), .s(fa_s[j]), .c(fa_c[j]));
    half_adder u_h1 (.a(a[j]), .b(b[j]), .s(h1_s[j]), .c(h1_c[j]));
    half_adder u_h2 (.a(h1_s[j]), .b(h1_c_up[j]), .s(h2_s[j]), .c(h2_c[j]));
  end

  always_comb begin
    if (mode == CSA_FA) begin
      ss = fa_s;
      sc = {fa_c[W-2:0], 1'b0};
    end else begin
      ss = h2_s;
      sc = {h2_c[W-2:0], 1'b0};
    end
  end
endmodule
