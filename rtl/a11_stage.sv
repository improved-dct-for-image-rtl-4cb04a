// a11_stage: second butterfly (factor A11) of the 8-point approximate DCT.
//
// A11 = diag([1 0 0 1; 0 1 1 0; 0 1 -1 0; 1 0 0 -1], I4). Four adders work on
// the even half from a1_stage,
//   v0 = u0 + u3,  v1 = u1 + u2,  v2 = u1 - u2,  v3 = u0 - u3,
// and the odd half u4..u7 passes on unchanged. All eight lanes are registered.
// The A11 box of the signal-flow graph draws flip-flops only on the four adder
// lanes; this design also registers the four pass-through lanes so that every
// coefficient of the 1-D transform leaves with the same latency (a choice of
// this design). One bit of growth; synchronous active-high reset.
//
// Timing: one vector per clock, latency one clock.
module a11_stage #(
  parameter int unsigned IN_W = 9
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  u [dct_pkg::N],
  output logic                    out_valid,
  output logic signed [IN_W:0]    v [dct_pkg::N]
);
  import dct_pkg::*;

  logic signed [IN_W:0] v_d [N];

  always_comb begin
    v_d[0] = (IN_W+1)'(u[0]) + (IN_W+1)'(u[3]);
    v_d[1] = (IN_W+1)'(u[1]) + (IN_W+1)'(u[2]);
    v_d[2] = (IN_W+1)'(u[1]) - (IN_W+1)'(u[2]);
    v_d[3] = (IN_W+1)'(u[0]) - (IN_W+1)'(u[3]);
    for (int i = N/2; i < N; i++) v_d[i] = (IN_W+1)'(u[i]);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      for (int i = 0; i < N; i++) v[i] <= '0;
    end else begin
      out_valid <= in_valid;
      for (int i = 0; i < N; i++) v[i] <= v_d[i];
    end
  end

endmodule
