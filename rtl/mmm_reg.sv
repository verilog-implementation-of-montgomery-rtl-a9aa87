// mmm_reg: W-bit register used for every storage element of the multiplier
// (operands A, N, B, the precomputed D = B + N, and the carry-save pair SS,
// SC). On a rising clock edge a synchronous clear wins over a load; with
// neither the register holds. rst_n is an asynchronous active-low reset to
// zero. Reset and clear behaviour are this design's choice.
module mmm_reg #(
  parameter int unsigned W = 7
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         load,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= '0;
    else if (clr)  q <= '0;
    else if (load) q <= d;
  end
endmodule
