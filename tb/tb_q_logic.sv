// tb_q_logic: exhaustive check of the quotient bit. For every input
// combination q_i must make (S + a_i*B + q_i*N) even for an odd N, where the
// parity of S is the sum of the two carry-save LSBs.
module tb_q_logic;
  logic ss0, sc0, ai, b0, qi;
  int checks = 0, failures = 0;
  int sum;

  q_logic dut (.ss_lsb(ss0), .sc_lsb(sc0), .a_i(ai), .b_0(b0), .q_i(qi));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 16; t++) begin
      {ss0, sc0, ai, b0} = 4'(t);
      #1;
      // N odd contributes q_i to the parity
      sum = int'(ss0) + int'(sc0) + int'(ai & b0) + int'(qi);
      checks++;
      if (sum % 2 != 0) begin
        failures++;
        $display("FAIL inputs=%b q_i=%b", 4'(t), qi);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
