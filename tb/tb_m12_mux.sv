// tb_m12_mux: checks the M1/M2 multiplexer's three selections (register
// shifted right by one, register unshifted, operand) on random data.
module tb_m12_mux;
  import mmm_pkg::*;
  localparam int unsigned W = 9;
  m12_sel_e     sel;
  logic [W-1:0] r, o, y, e;
  int checks = 0, failures = 0;

  m12_mux #(.W(W)) dut (.sel, .reg_in(r), .operand(o), .y);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 600; t++) begin
      r = W'($urandom);
      o = W'($urandom);
      case (t % 3)
        0: begin sel = M12_SHIFT;   e = {1'b0, r[W-1:1]}; end
        1: begin sel = M12_PASS;    e = r; end
        default: begin sel = M12_OPERAND; e = o; end
      endcase
      #1;
      checks++;
      if (y !== e) begin
        failures++;
        $display("FAIL sel=%0d r=%h o=%h y=%h expected %h", sel, r, o, y, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
