// tb_mmm_ctrl: checks the sequencer on its own. Zero_D is modelled by the
// testbench, which reports SC = 0 after a chosen number of conversion passes
// in precomputation (p1) and after the loop (p2). For every (p1, p2) pair the
// test checks the phase order, the control outputs of each phase, that the
// loop runs exactly K+2 iterations and that done comes K+6+p1+p2 cycles after
// start.
module tb_mmm_ctrl;
  import mmm_pkg::*;
  localparam int unsigned K = 6;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, sc_zero;
  state_e    state;
  logic      ld_abn, a_shift, ss_sc_clr, ss_sc_ld, d_ld, m3_en, busy, done;
  m12_sel_e  m12_sel;
  csa_mode_e csa_mode;
  int checks = 0, failures = 0;
  int passes;      // conversion passes already made in the current phase
  int p1, p2;

  mmm_ctrl #(.K(K)) dut (.clk, .rst_n, .start, .sc_zero, .state, .ld_abn, .a_shift,
    .ss_sc_clr, .ss_sc_ld, .d_ld, .m12_sel, .m3_en, .csa_mode, .busy, .done);

  always #5 clk = ~clk;

  // Zero_D model: SC is zero once the phase has made its number of passes.
  always_comb begin
    if (state == ST_PRE_CONV)       sc_zero = (passes >= p1);
    else if (state == ST_POST_CONV) sc_zero = (passes >= p2);
    else                            sc_zero = 1'b0;
  end

  always_ff @(posedge clk) begin
    if ((state == ST_PRE_CONV || state == ST_POST_CONV) && !sc_zero) passes <= passes + 1;
    else if (state != ST_PRE_CONV && state != ST_POST_CONV)          passes <= 0;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (state=%s p1=%0d p2=%0d)", what, state.name(), p1, p2);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc, mul_cycles;
    passes = 0;
    p1 = 0;
    p2 = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (p1 = 0; p1 < 4; p1++) begin
      for (p2 = 0; p2 < 4; p2++) begin
        @(negedge clk);
        check(state == ST_IDLE && !busy, "idle before start");
        start = 1'b1;
        #1;
        check(ld_abn && ss_sc_clr && !ss_sc_ld, "start loads operands and clears SS/SC");
        @(negedge clk);
        start = 1'b0;
        cyc = 1;
        mul_cycles = 0;
        while (!done && cyc < 200) begin
          check(busy, "busy while running");
          unique case (state)
            ST_PRE_ADD: check(m12_sel == M12_OPERAND && csa_mode == CSA_HA2 && !m3_en && ss_sc_ld && d_ld,
                              "pre-add controls");
            ST_PRE_CONV: if (sc_zero) check(ss_sc_clr && !d_ld, "pre-conv end clears");
                         else check(m12_sel == M12_PASS && csa_mode == CSA_HA2 && !m3_en && ss_sc_ld && d_ld,
                                    "pre-conv controls");
            ST_MUL: begin
              mul_cycles++;
              check(m12_sel == M12_SHIFT && csa_mode == CSA_FA && m3_en && ss_sc_ld && a_shift,
                    "multiply controls");
            end
            ST_POST_SHIFT: check(m12_sel == M12_SHIFT && csa_mode == CSA_HA2 && !m3_en && ss_sc_ld,
                                 "post-shift controls");
            ST_POST_CONV: check(m12_sel == M12_PASS && csa_mode == CSA_HA2 && !m3_en && ss_sc_ld,
                                "post-conv controls");
            default: check(1'b0, "unexpected state");
          endcase
          @(negedge clk);
          cyc++;
        end
        check(done && state == ST_POST_CONV, "done in final conversion");
        check(mul_cycles == K + 2, "K+2 iterations");
        check(cyc == K + 6 + p1 + p2, "latency");
        if (cyc != K + 6 + p1 + p2) $display("  latency %0d expected %0d", cyc, K + 6 + p1 + p2);
        @(negedge clk);  // let the sequencer return to idle before p1/p2 change
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
