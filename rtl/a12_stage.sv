// a12_stage: last stage (factor A12) of the 8-point approximate DCT.
//
// A12 = diag([1 1; 1 -1], -1, I5). Two adders combine the two even sums,
//   w0 = v0 + v1,  w1 = v0 - v1,
// lane 2 is negated (w2 = -v2) and lanes 3..7 pass on. All eight lanes are
// registered. The lanes then hold the coefficients in the order
// X0, X4, X6, X2, X5, X7, X1, X3 (the permutation P4 is pure wiring, done in
// dct1d). One bit of growth, which the negation of the most negative input
// needs; synchronous active-high reset.
//
// Timing: one vector per clock, latency one clock.
module a12_stage #(
  parameter int unsigned IN_W = 10
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  v [dct_pkg::N],
  output logic                    out_valid,
  output logic signed [IN_W:0]    w [dct_pkg::N]
);
  import dct_pkg::*;

  logic signed [IN_W:0] w_d [N];

  always_comb begin
    w_d[0] = (IN_W+1)'(v[0]) + (IN_W+1)'(v[1]);
    w_d[1] = (IN_W+1)'(v[0]) - (IN_W+1)'(v[1]);
    w_d[2] = -(IN_W+1)'(v[2]);
    for (int i = 3; i < N; i++) w_d[i] = (IN_W+1)'(v[i]);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      for (int i = 0; i < N; i++) w[i] <= '0;
    end else begin
      out_valid <= in_valid;
      for (int i = 0; i < N; i++) w[i] <= w_d[i];
    end
  end

endmodule
