// tb_mmm_reg: checks the register's reset, load, hold and clear (clear has
// priority over load) against a reference value kept by the testbench.
module tb_mmm_reg;
  localparam int unsigned W = 8;
  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, load = 1'b0;
  logic [W-1:0] d = '0, q, ref_q;
  int checks = 0, failures = 0;

  mmm_reg #(.W(W)) dut (.clk, .rst_n, .clr, .load, .d, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_q = '0;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (q !== '0) begin failures++; $display("FAIL reset q=%h", q); end
    rst_n = 1'b1;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      clr  = ($urandom % 6 == 0);
      load = ($urandom % 2 == 0);
      d    = W'($urandom);
      @(posedge clk);
      if (clr)       ref_q = '0;
      else if (load) ref_q = d;
      #1;
      checks++;
      if (q !== ref_q) begin
        failures++;
        $display("FAIL t=%0d clr=%b load=%b d=%h q=%h expected %h", t, clr, load, d, q, ref_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
