// a1_stage: input butterfly (factor A1) of the 8-point approximate DCT.
//
// Eight adders form the sums and differences of mirrored inputs,
//   u[i]   = x[i]   + x[7-i]          i = 0..3
//   u[4+i] = x[3-i] - x[4+i]          i = 0..3
// i.e. u4 = x3-x4, u5 = x2-x5, u6 = x1-x6, u7 = x0-x7, and registers them, as
// the A1 box of the signal-flow graph draws (one adder and one D flip-flop per
// lane). The operand signs follow the factorization of the transform; the
// result grows by one bit so nothing wraps (the original listing kept all
// words at 8 bits). A valid bit travels with the data; reset is synchronous
// and active high and clears the registers.
//
// Timing: one vector per clock, latency one clock.
module a1_stage #(
  parameter int unsigned IN_W = 8
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  x [dct_pkg::N],
  output logic                    out_valid,
  output logic signed [IN_W:0]    u [dct_pkg::N]
);
  import dct_pkg::*;

  logic signed [IN_W:0] u_d [N];

  always_comb begin
    for (int i = 0; i < N/2; i++) begin
      u_d[i]       = (IN_W+1)'(x[i])       + (IN_W+1)'(x[N-1-i]);
      u_d[N/2 + i] = (IN_W+1)'(x[N/2-1-i]) - (IN_W+1)'(x[N/2+i]);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      for (int i = 0; i < N; i++) u[i] <= '0;
    end else begin
      out_valid <= in_valid;
      for (int i = 0; i < N; i++) u[i] <= u_d[i];
    end
  end

endmodule
