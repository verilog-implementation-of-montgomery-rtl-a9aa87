// tb_csa: self-checking test of the configurable carry-save adder.
// Random operands below 2^(W-1) in both configurations; checks that the
// carry-save pair sums to a+b+c (full-adder mode) or a+b (two half adders),
// that sc[0] is 0, and compares ss/sc with the per-bit adder equations.
module tb_csa;
  import mmm_pkg::*;
  localparam int unsigned W = 12;
  csa_mode_e    mode;
  logic [W-1:0] a, b, c, ss, sc;
  logic [W-1:0] e_ss, e_sc, s1, k1;
  int checks = 0, failures = 0;

  csa #(.W(W)) dut (.mode, .a, .b, .c, .ss, .sc);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: mode=%0d a=%0d b=%0d c=%0d ss=%0d sc=%0d", what, mode, a, b, c, ss, sc);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      a    = W'($urandom) & {1'b0, {(W-1){1'b1}}};
      b    = W'($urandom) & {1'b0, {(W-1){1'b1}}};
      c    = W'($urandom) & {1'b0, {(W-1){1'b1}}};
      mode = (t % 2 == 0) ? CSA_FA : CSA_HA2;
      #1;
      if (mode == CSA_FA) begin
        e_ss = a ^ b ^ c;
        e_sc = ((a & b) | (a & c) | (b & c)) << 1;
        check((W+1)'(ss) + (W+1)'(sc) == (W+1)'(a) + (W+1)'(b) + (W+1)'(c), "FA sum");
      end else begin
        s1   = a ^ b;
        k1   = (a & b) << 1;
        e_ss = s1 ^ k1;
        e_sc = (s1 & k1) << 1;
        check((W+1)'(ss) + (W+1)'(sc) == (W+1)'(a) + (W+1)'(b), "HA2 sum");
      end
      check(ss == e_ss && sc == e_sc, "bit equations");
      check(sc[0] == 1'b0, "sc lsb");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
