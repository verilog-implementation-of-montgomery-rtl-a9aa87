// m12_mux: the M1/M2 multiplexer in front of the carry-save adder.
//
// In the multiply loop the right shift of each iteration is deferred to the
// next clock, so this mux feeds the adder with its carry-save register
// shifted right by one (M12_SHIFT). During precomputation and format
// conversion it passes the register unshifted (M12_PASS), and for the first
// precomputation step it selects an operand register (M12_OPERAND): N for M1
// and B for M2, as in the datapath drawing. Which register feeds which mux is
// taken from that drawing; the select encoding is this design's own.
//
// Interface: W-bit vectors, purely combinational. An unused select value
// gives zero.
module m12_mux
  import mmm_pkg::*;
#(
  parameter int unsigned W = 7
) (
  input  m12_sel_e     sel,
  input  logic [W-1:0] reg_in,   // SC (M1) or SS (M2)
  input  logic [W-1:0] operand,  // N (M1) or B (M2)
  output logic [W-1:0] y
);
  always_comb begin
    unique case (sel)
      M12_SHIFT:   y = reg_in >> 1;
      M12_PASS:    y = reg_in;
      M12_OPERAND: y = operand;
      default:     y = '0;
    endcase
  end
endmodule
