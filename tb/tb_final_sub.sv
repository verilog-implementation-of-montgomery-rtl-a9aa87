// tb_final_sub: exhaustive check of the conditional subtraction for K = 5:
// every odd normalised N and every S below 2N must give S mod N.
module tb_final_sub;
  localparam int unsigned K = 5;
  logic [K:0]   s;
  logic [K-1:0] n, y;
  int checks = 0, failures = 0;

  final_sub #(.K(K)) dut (.s, .n, .y);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int nv = (1 << (K - 1)) + 1; nv < (1 << K); nv += 2) begin
      for (int sv = 0; sv < 2 * nv; sv++) begin
        n = K'(nv);
        s = (K+1)'(sv);
        #1;
        checks++;
        if (int'(y) != sv % nv) begin
          failures++;
          $display("FAIL s=%0d n=%0d y=%0d", sv, nv, y);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
