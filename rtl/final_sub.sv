// final_sub: conditional subtraction after the Montgomery loop.
//
// The loop leaves S = A*B*2^-(k+2) mod N in the range [0, 2N). One
// subtraction of N when S >= N brings it into [0, N). The source names this
// step ("one final conditional subtract") and its printed test results are
// fully reduced values, but its datapath drawing does not show the
// subtractor; it is built here as a separate combinational stage on SS.
//
// Interface: s is K+1 bits (S < 2N < 2^(K+1)), n and y are K bits.
module final_sub #(
  parameter int unsigned K = 4
) (
  input  logic [K:0]   s,
  input  logic [K-1:0] n,
  output logic [K-1:0] y
);
  // When s >= N the difference is below N < 2^K, so K bits of it suffice.
  logic [K-1:0] diff;
  always_comb begin
    diff = s[K-1:0] - n;
    y    = (s >= {1'b0, n}) ? diff : s[K-1:0];
  end
endmodule
