// tb_mmm: end-to-end test of the Montgomery multiplier at its default size
// (K = 4). Runs the two printed example vectors (A=f, B=6, N=9 -> 0 and
// A=8, B=9, N=c -> 8), then every A and B against every odd normalised
// modulus (N = 9, 11, 13, 15). Each result is compared with
// A*B*2^-(K+2) mod N computed here by plain integer arithmetic. It also
// checks that SC is zero and SS below 2N when done rises, that the loop takes
// exactly K+2 cycles, that the latency is K+6 plus the conversion passes and
// stays within its bound, and counts how often each mechanism occurred:
// conversion passes before and after the loop, each of the four M3
// selections, and the final subtraction taken and not taken.
module tb_mmm;
  import mmm_pkg::*;
  localparam int unsigned K = 4;
  localparam int unsigned W = K + 3;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [K-1:0] a, b, n, result;
  logic busy, done;
  logic [W-1:0] ss_o, sc_o;
  int checks = 0, failures = 0;
  int n_preconv = 0, n_postconv = 0, n_sub = 0, n_nosub = 0;
  int n_sel[4] = '{0, 0, 0, 0};

  mmm dut (.clk, .rst_n, .start, .a, .b, .n, .busy, .done, .result, .ss_o, .sc_o);

  always #5 clk = ~clk;

  // count M3 selections made during the loop
  always @(posedge clk)
    if (rst_n && dut.state == ST_MUL) n_sel[{dut.a_q[0], dut.q_i}]++;

  function automatic longint unsigned mont_ref(longint unsigned av, longint unsigned bv,
                                               longint unsigned nv, int iters);
    longint unsigned x = (av * bv) % nv;
    for (int i = 0; i < iters; i++) begin
      if (x[0]) x += nv;
      x >>= 1;
    end
    return x;
  endfunction

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: A=%0d B=%0d N=%0d result=%0d ss=%0d sc=%0d", what, a, b, n, result, ss_o, sc_o);
    end
  endtask

  // one multiplication; returns the result
  task automatic run(input int av, input int bv, input int nv, input int expect_v, input logic check_cycles);
    int cyc, mul, pre, post;
    @(negedge clk);
    a = K'(av); b = K'(bv); n = K'(nv);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1; mul = 0; pre = 0; post = 0;
    while (!done && cyc < 100) begin
      if (dut.state == ST_MUL) mul++;
      if (dut.state == ST_PRE_CONV && !dut.sc_zero) pre++;
      if (dut.state == ST_POST_CONV && !dut.sc_zero) post++;
      @(negedge clk);
      cyc++;
    end
    check(done, "done within 100 cycles");
    check(int'(result) == expect_v, "result");
    check(sc_o == '0, "SC zero at done");
    check(int'(ss_o) < 2 * nv, "SS below 2N");
    if (check_cycles) begin
      check(mul == K + 2, "K+2 loop iterations");
      check(cyc == K + 6 + pre + post, "latency");
      check(pre <= (W + 1) / 2 + 1 && post <= (W + 1) / 2 + 1, "conversion passes bounded");
      if (nv % 2 == 1) begin
        if (int'(ss_o) >= nv) n_sub++; else n_nosub++;
      end
    end
    if (pre > 0) n_preconv++;
    if (post > 0) n_postconv++;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = '0; b = '0; n = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // printed example vectors (the second uses an even modulus)
    run(15, 6, 9, 0, 1'b1);
    run(8, 9, 12, 8, 1'b1);
    for (int nv = (1 << (K - 1)) + 1; nv < (1 << K); nv += 2)
      for (int av = 0; av < (1 << K); av++)
        for (int bv = 0; bv < (1 << K); bv++)
          run(av, bv, nv, int'(mont_ref(longint'(av), longint'(bv), longint'(nv), K + 2)), 1'b1);
    $display("mechanisms: pre-conversion passes %0d, post-conversion passes %0d, subtraction %0d/%0d, M3 0:%0d N:%0d B:%0d D:%0d",
             n_preconv, n_postconv, n_sub, n_nosub, n_sel[0], n_sel[1], n_sel[2], n_sel[3]);
    checks++; if (n_preconv == 0)  begin failures++; $display("FAIL no pre-conversion pass"); end
    checks++; if (n_postconv == 0) begin failures++; $display("FAIL no post-conversion pass"); end
    checks++; if (n_sub == 0)      begin failures++; $display("FAIL final subtraction never taken"); end
    checks++; if (n_nosub == 0)    begin failures++; $display("FAIL final subtraction always taken"); end
    for (int s = 0; s < 4; s++) begin
      checks++;
      if (n_sel[s] == 0) begin failures++; $display("FAIL M3 selection %0d never used", s); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
