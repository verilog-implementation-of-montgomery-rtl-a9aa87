// mmm: Montgomery modular multiplier with a single carry-save adder level.
//
// Computes P = A * B * 2^-(K+2) mod N for a K-bit odd modulus N whose top bit
// is set (normalised) and K-bit operands A, B. The product is built by the
// radix-2 Montgomery recurrence S <- (S + A_i*B + q_i*N) / 2 over K+2
// iterations, with S kept in carry-save form (SS, SC) so that no iteration
// waits for a carry to ripple. The two additions per iteration collapse into
// one because M3 picks 0, N, B or the precomputed D = B + N. The same adder
// computes D before the loop and converts (SS, SC) back to binary after it,
// by repeating (SS, SC) = SS + SC + 0 until SC = 0 (Zero_D); for those passes
// it runs as two half adders in series. A final conditional subtraction
// brings the loop's result (below 2N) below N.
//
// Block structure (registers A, N, B, D, SS, SC; muxes M1, M2, M3; quotient
// logic Q_L; CSA; Zero_D) follows the source's datapath drawing. The final
// subtractor, the control sequence details and the handshake are this
// design's choices (see mmm_ctrl and final_sub).
//
// Interface:
//   start  pulse in idle to begin; a, b, n are sampled on that clock.
//   busy   high while a multiplication runs.
//   done   one-cycle pulse; result is valid from then until the next start.
//   result A*B*2^-(K+2) mod N, K bits.
//   ss_o, sc_o  the carry-save registers (sc_o is zero whenever done is high).
// Timing: done comes K + 6 + c1 + c2 cycles after start, c1/c2 being the
// data-dependent conversion passes (each between 0 and about (K+3)/2).
// Width: SS, SC and the adder are K+3 bits, enough for every intermediate
// value (below 2(B+N) < 2^(K+2)) with one bit of headroom so that no carry is
// lost at the top of the carry-save pair.
module mmm
  import mmm_pkg::*;
#(
  parameter int unsigned K = 4
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [K-1:0]   a,
  input  logic [K-1:0]   b,
  input  logic [K-1:0]   n,
  output logic           busy,
  output logic           done,
  output logic [K-1:0]   result,
  output logic [K+2:0]   ss_o,
  output logic [K+2:0]   sc_o
);
  localparam int unsigned W = K + 3;

  // control
  state_e    state;
  logic      ld_abn, a_shift, ss_sc_clr, ss_sc_ld, d_ld, m3_en;
  m12_sel_e  m12_sel;
  csa_mode_e csa_mode;
  logic      sc_zero;

  // datapath
  logic [K-1:0] a_q, a_d;
  logic [K-1:0] b_q, n_q;
  logic [W-1:0] b_w, n_w, d_q;
  logic [W-1:0] ss_q, sc_q;
  logic [W-1:0] m1_y, m2_y, m3_y;
  logic [W-1:0] csa_ss, csa_sc;
  logic         q_i;

  assign b_w = W'(b_q);
  assign n_w = W'(n_q);
  assign a_d = ld_abn ? a : (a_q >> 1);

  mmm_ctrl #(.K(K)) u_ctrl (
    .clk, .rst_n, .start, .sc_zero, .state,
    .ld_abn, .a_shift, .ss_sc_clr, .ss_sc_ld, .d_ld,
    .m12_sel, .m3_en, .csa_mode, .busy, .done
  );

  // operand registers
  mmm_reg #(.W(K)) u_reg_a (.clk, .rst_n, .clr(1'b0), .load(ld_abn | a_shift), .d(a_d), .q(a_q));
  mmm_reg #(.W(K)) u_reg_b (.clk, .rst_n, .clr(1'b0), .load(ld_abn), .d(b), .q(b_q));
  mmm_reg #(.W(K)) u_reg_n (.clk, .rst_n, .clr(1'b0), .load(ld_abn), .d(n), .q(n_q));
  mmm_reg #(.W(W)) u_reg_d (.clk, .rst_n, .clr(1'b0), .load(d_ld), .d(csa_ss), .q(d_q));

  // M1 feeds SC (or N), M2 feeds SS (or B)
  m12_mux #(.W(W)) u_m1 (.sel(m12_sel), .reg_in(sc_q), .operand(n_w), .y(m1_y));
  m12_mux #(.W(W)) u_m2 (.sel(m12_sel), .reg_in(ss_q), .operand(b_w), .y(m2_y));

  q_logic u_ql (.ss_lsb(m2_y[0]), .sc_lsb(m1_y[0]), .a_i(a_q[0]), .b_0(b_q[0]), .q_i);

  m3_mux #(.W(W)) u_m3 (.en(m3_en), .a_i(a_q[0]), .q_i, .n(n_w), .b(b_w), .d(d_q), .y(m3_y));

  csa #(.W(W)) u_csa (.mode(csa_mode), .a(m2_y), .b(m1_y), .c(m3_y), .ss(csa_ss), .sc(csa_sc));

  mmm_reg #(.W(W)) u_reg_ss (.clk, .rst_n, .clr(ss_sc_clr), .load(ss_sc_ld), .d(csa_ss), .q(ss_q));
  mmm_reg #(.W(W)) u_reg_sc (.clk, .rst_n, .clr(ss_sc_clr), .load(ss_sc_ld), .d(csa_sc), .q(sc_q));

  zero_d #(.W(W)) u_zd (.sc(sc_q), .zero(sc_zero));

  final_sub #(.K(K)) u_fs (.s(ss_q[K:0]), .n(n_q), .y(result));

  assign ss_o = ss_q;
  assign sc_o = sc_q;

  // With an odd modulus every iteration's sum is even, so the deferred
  // halving drops nothing.
  a_even_sum : assert property (@(posedge clk) disable iff (!rst_n)
    (n_q[0] && (state == ST_MUL || state == ST_POST_SHIFT)) |-> (ss_q[0] == 1'b0 && sc_q[0] == 1'b0));
  // The carry vector is always aligned: its bit 0 is never set.
  a_sc_lsb : assert property (@(posedge clk) disable iff (!rst_n) sc_q[0] == 1'b0);
  // After conversion the sum fits in K+1 bits, as final_sub expects.
  a_result_range : assert property (@(posedge clk) disable iff (!rst_n)
    done |-> (ss_q[W-1:K+1] == '0));
endmodule
