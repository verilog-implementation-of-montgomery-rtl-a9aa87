// mmm_ctrl: sequencer of the Montgomery modular multiplier.
//
// One multiplication runs through these phases (state_e in mmm_pkg):
//   PRE_ADD     (SS, SC) = N + B, with N and B taken through M1/M2.
//   PRE_CONV    (SS, SC) = SS + SC + 0, repeated until Zero_D reports SC = 0;
//               D follows the adder's sum output, so it then holds B + N.
//               On the cycle that sees SC = 0, SS and SC are cleared.
//   MUL         k+2 iterations (SS, SC) = SS>>1 + SC>>1 + M3, M3 chosen by
//               A_i and q_i; A shifts right by one each iteration. The
//               halving of each iteration is applied by M1/M2 on the next
//               cycle rather than at the adder output.
//   POST_SHIFT  applies the last deferred halving: (SS, SC) = SS>>1 + SC>>1.
//   POST_CONV   (SS, SC) = SS + SC + 0 until SC = 0; then done pulses and SS
//               holds the result.
// Precomputation and conversion use the adder's two-half-adder
// configuration, so each of those cycles moves carries two places.
// The phases and their end conditions (k+2 iterations, "until SC = 0") come
// from the source; the explicit clear of SS/SC before the loop, the extra
// POST_SHIFT cycle and the start/done/busy handshake are this design's.
//
// Interface: start is sampled in IDLE only; busy is high from the cycle after
// start until done; done is high for one cycle with the result already in SS.
// Latency: done is high K + 6 + c1 + c2 cycles after the cycle in which start
// is taken, where c1 and c2 are the number of half-adder passes the two
// conversions need before SC is zero (0 up to about W/2 each).
module mmm_ctrl
  import mmm_pkg::*;
#(
  parameter int unsigned K = 4
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      start,
  input  logic      sc_zero,     // from Zero_D
  output state_e    state,
  output logic      ld_abn,      // load A, B, N from the inputs
  output logic      a_shift,     // A <= A >> 1
  output logic      ss_sc_clr,
  output logic      ss_sc_ld,
  output logic      d_ld,
  output m12_sel_e  m12_sel,     // M1 and M2 select (always the same)
  output logic      m3_en,
  output csa_mode_e csa_mode,
  output logic      busy,
  output logic      done
);
  localparam int unsigned ITERS = K + 2;
  localparam int unsigned CW    = $clog2(ITERS + 1);

  state_e        state_n;
  logic [CW-1:0] cnt, cnt_n;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= ST_IDLE;
      cnt   <= '0;
    end else begin
      state <= state_n;
      cnt   <= cnt_n;
    end
  end

  always_comb begin
    state_n   = state;
    cnt_n     = cnt;
    ld_abn    = 1'b0;
    a_shift   = 1'b0;
    ss_sc_clr = 1'b0;
    ss_sc_ld  = 1'b0;
    d_ld      = 1'b0;
    m12_sel   = M12_PASS;
    m3_en     = 1'b0;
    csa_mode  = CSA_HA2;
    busy      = (state != ST_IDLE);
    done      = 1'b0;
    unique case (state)
      ST_IDLE: begin
        if (start) begin
          ld_abn    = 1'b1;
          ss_sc_clr = 1'b1;
          state_n   = ST_PRE_ADD;
        end
      end
      ST_PRE_ADD: begin
        m12_sel  = M12_OPERAND;
        ss_sc_ld = 1'b1;
        d_ld     = 1'b1;
        state_n  = ST_PRE_CONV;
      end
      ST_PRE_CONV: begin
        if (sc_zero) begin
          ss_sc_clr = 1'b1;
          cnt_n     = '0;
          state_n   = ST_MUL;
        end else begin
          ss_sc_ld = 1'b1;
          d_ld     = 1'b1;
        end
      end
      ST_MUL: begin
        m12_sel  = M12_SHIFT;
        m3_en    = 1'b1;
        csa_mode = CSA_FA;
        ss_sc_ld = 1'b1;
        a_shift  = 1'b1;
        cnt_n    = cnt + 1'b1;
        if (cnt == CW'(ITERS - 1)) state_n = ST_POST_SHIFT;
      end
      ST_POST_SHIFT: begin
        m12_sel  = M12_SHIFT;
        ss_sc_ld = 1'b1;
        state_n  = ST_POST_CONV;
      end
      ST_POST_CONV: begin
        if (sc_zero) begin
          done    = 1'b1;
          state_n = ST_IDLE;
        end else begin
          ss_sc_ld = 1'b1;
        end
      end
      default: state_n = ST_IDLE;
    endcase
  end
endmodule
