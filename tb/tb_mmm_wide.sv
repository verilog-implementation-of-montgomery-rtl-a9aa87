// tb_mmm_wide: the multiplier at a cryptographic-style width (K = 128) on
// random operands. N is random, odd and normalised (top bit set); A and B are
// random K-bit values. Each result is compared with A*B*2^-(K+2) mod N worked
// out here with wide integer arithmetic, and the loop length (K+2 cycles) and
// latency (K+6 plus conversion passes) are checked as in tb_mmm. The last
// check chains results: the output of one multiplication is fed back as an
// operand, as in a modular exponentiation kept in Montgomery form.
module tb_mmm_wide;
  import mmm_pkg::*;
  localparam int unsigned K = 128;
  localparam int unsigned W = K + 3;
  typedef logic [2*K+3:0] wide_t;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [K-1:0] a, b, n, result, prev;
  logic busy, done;
  logic [W-1:0] ss_o, sc_o;
  int checks = 0, failures = 0;

  mmm #(.K(K)) dut (.clk, .rst_n, .start, .a, .b, .n, .busy, .done, .result, .ss_o, .sc_o);

  always #5 clk = ~clk;

  function automatic logic [K-1:0] rand_k();
    logic [K-1:0] v;
    for (int i = 0; i < K; i += 32) v[i +: 32] = $urandom;
    return v;
  endfunction

  function automatic logic [K-1:0] mont_ref(logic [K-1:0] av, logic [K-1:0] bv, logic [K-1:0] nv);
    wide_t x = (wide_t'(av) * wide_t'(bv)) % wide_t'(nv);
    for (int i = 0; i < K + 2; i++) begin
      if (x[0]) x += wide_t'(nv);
      x >>= 1;
    end
    return x[K-1:0];
  endfunction

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: A=%h B=%h N=%h result=%h", what, a, b, n, result);
    end
  endtask

  task automatic run(input logic [K-1:0] av, input logic [K-1:0] bv, input logic [K-1:0] nv);
    int cyc, mul, pre, post;
    logic [K-1:0] e;
    e = mont_ref(av, bv, nv);
    @(negedge clk);
    a = av; b = bv; n = nv;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1; mul = 0; pre = 0; post = 0;
    while (!done && cyc < 1000) begin
      if (dut.state == ST_MUL) mul++;
      if (dut.state == ST_PRE_CONV && !dut.sc_zero) pre++;
      if (dut.state == ST_POST_CONV && !dut.sc_zero) post++;
      @(negedge clk);
      cyc++;
    end
    check(done, "done");
    check(result == e, "result");
    check(sc_o == '0, "SC zero at done");
    check(mul == K + 2, "K+2 loop iterations");
    check(cyc == K + 6 + pre + post, "latency");
  endtask

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [K-1:0] nv;
    a = '0; b = '0; n = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 200; t++) begin
      nv = rand_k();
      nv[K-1] = 1'b1;
      nv[0] = 1'b1;
      run(rand_k(), rand_k(), nv);
    end
    // chained multiplications with one modulus
    nv = rand_k(); nv[K-1] = 1'b1; nv[0] = 1'b1;
    prev = rand_k() % nv;
    for (int t = 0; t < 20; t++) begin
      run(prev, prev, nv);
      prev = result;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
