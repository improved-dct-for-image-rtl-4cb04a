// dct1d: 8-point multiplier-free approximate DCT, X = T_p * x.
//
// The transform matrix T_p (see dct_pkg) has entries 0 and +/-1 and factors
// as T_p = P4 * A12 * A11 * A1, which needs 14 additions and no multiplier or
// shift: 8 in a1_stage, 4 in a11_stage and 2 in a12_stage. The three stages are
// chained as in the signal-flow graph of the transform, and the permutation
// P4 is applied by wiring, so y[] holds X0..X7 in natural order. The diagonal
// scaling that would make T_p orthonormal is not applied (it belongs to the
// quantiser of a codec).
//
// Interface: a signed IN_W-bit vector x[0..7] with a valid bit goes in; the
// signed (IN_W+3)-bit result y[0..7] comes out with its valid bit. Widths grow
// one bit per stage so no result wraps. busy is high while any vector is in
// the pipeline.
//
// Timing: fully pipelined, one vector per clock, latency three clocks
// (one register per stage). Synchronous active-high reset.
module dct1d #(
  parameter int unsigned IN_W = 8
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic                        in_valid,
  input  logic signed [IN_W-1:0]      x [dct_pkg::N],
  output logic                        out_valid,
  output logic signed [IN_W+2:0]      y [dct_pkg::N],
  output logic                        busy
);
  import dct_pkg::*;

  logic                     a1_valid, a11_valid;
  logic signed [IN_W:0]     u [N];
  logic signed [IN_W+1:0]   v [N];
  logic signed [IN_W+2:0]   w [N];

  a1_stage #(.IN_W(IN_W)) u_a1 (
    .clk, .rst, .in_valid, .x,
    .out_valid(a1_valid), .u
  );

  a11_stage #(.IN_W(IN_W+1)) u_a11 (
    .clk, .rst, .in_valid(a1_valid), .u,
    .out_valid(a11_valid), .v
  );

  a12_stage #(.IN_W(IN_W+2)) u_a12 (
    .clk, .rst, .in_valid(a11_valid), .v,
    .out_valid, .w
  );

  // Output permutation P4: A12 lane i carries coefficient STAGE_TO_COEF[i].
  always_comb begin
    for (int i = 0; i < N; i++) y[STAGE_TO_COEF[i]] = w[i];
  end

  assign busy = a1_valid | a11_valid | out_valid;

endmodule
