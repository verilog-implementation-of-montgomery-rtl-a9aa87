// mmm_pkg: types shared by the Montgomery modular multiplier.
//
// csa_mode_e chooses how the one-level configurable carry-save adder works:
// one full adder per bit (three operands, used by the multiply iterations) or
// two half adders in series per bit (two operands, used when the third input
// is zero, so that one clock does two carry-save steps of precomputation or
// format conversion).
//
// m12_sel_e is the select of the M1/M2 multiplexers in front of the adder:
// the carry-save register shifted right by one (the right shift of the
// previous iteration, deferred to this cycle), the register unshifted, or an
// operand register (N through M1, B through M2).
package mmm_pkg;

  typedef enum logic {
    CSA_FA  = 1'b0,  // ss + sc = a + b + c
    CSA_HA2 = 1'b1   // ss + sc = a + b, carries moved two places per cycle
  } csa_mode_e;

  typedef enum logic [1:0] {
    M12_SHIFT   = 2'd0,  // register >> 1
    M12_PASS    = 2'd1,  // register
    M12_OPERAND = 2'd2   // operand register (N or B)
  } m12_sel_e;

  typedef enum logic [2:0] {
    ST_IDLE       = 3'd0,  // waiting for start
    ST_PRE_ADD    = 3'd1,  // (SS,SC) = N + B
    ST_PRE_CONV   = 3'd2,  // (SS,SC) = SS + SC until SC = 0, D <= SS
    ST_MUL        = 3'd3,  // k+2 Montgomery iterations
    ST_POST_SHIFT = 3'd4,  // last deferred right shift
    ST_POST_CONV  = 3'd5   // (SS,SC) = SS + SC until SC = 0
  } state_e;

endpackage
