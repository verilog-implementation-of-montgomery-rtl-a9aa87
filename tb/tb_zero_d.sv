// tb_zero_d: checks the SC zero detector on zero, on every one-hot value and
// on random values.
module tb_zero_d;
  localparam int unsigned W = 10;
  logic [W-1:0] sc;
  logic zero;
  int checks = 0, failures = 0;

  zero_d #(.W(W)) dut (.sc, .zero);

  task automatic check(input logic e);
    #1;
    checks++;
    if (zero !== e) begin
      failures++;
      $display("FAIL sc=%b zero=%b expected %b", sc, zero, e);
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
    sc = '0;
    check(1'b1);
    for (int j = 0; j < W; j++) begin
      sc = W'(1) << j;
      check(1'b0);
    end
    for (int t = 0; t < 200; t++) begin
      sc = W'($urandom);
      check(sc == '0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
