// m3_mux: the M3 multiplexer choosing the third adder input of a Montgomery
// iteration from the multiplier bit a_i and the quotient bit q_i:
//   a_i q_i = 00 -> 0,  01 -> N,  10 -> B,  11 -> D (= B + N, precomputed).
// Adding D in one step instead of B and N separately is what lets a single
// carry-save adder level do each iteration. The four inputs and two selects
// are those of the datapath drawing; the mapping is the standard one of
// Montgomery's algorithm.
//
// Interface: W-bit vectors, purely combinational. en = 0 forces 0 (used
// during precomputation and conversion, where the adder's third input is 0).
module m3_mux #(
  parameter int unsigned W = 7
) (
  input  logic         en,
  input  logic         a_i,
  input  logic         q_i,
  input  logic [W-1:0] n,
  input  logic [W-1:0] b,
  input  logic [W-1:0] d,
  output logic [W-1:0] y
);
  always_comb begin
    if (!en) begin
      y = '0;
    end else begin
      unique case ({a_i, q_i})
        2'b00:   y = '0;
        2'b01:   y = n;
        2'b10:   y = b;
        default: y = d;
      endcase
    end
  end
endmodule
