// tb_m3_mux: checks the M3 multiplexer's mapping (a_i, q_i) -> 0, N, B, D
// and that a low enable forces zero, on random data.
module tb_m3_mux;
  localparam int unsigned W = 9;
  logic en, ai, qi;
  logic [W-1:0] n, b, d, y, e;
  int checks = 0, failures = 0;

  m3_mux #(.W(W)) dut (.en, .a_i(ai), .q_i(qi), .n, .b, .d, .y);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 800; t++) begin
      n  = W'($urandom) | W'(1);
      b  = W'($urandom) | W'(1);
      d  = W'($urandom) | W'(1);
      ai = t[0];
      qi = t[1];
      en = (t % 5 != 4);
      #1;
      if (!en)           e = '0;
      else if (!ai && !qi) e = '0;
      else if (!ai)      e = n;
      else if (!qi)      e = b;
      else               e = d;
      checks++;
      if (y !== e) begin
        failures++;
        $display("FAIL en=%b a_i=%b q_i=%b y=%h expected %h", en, ai, qi, y, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
