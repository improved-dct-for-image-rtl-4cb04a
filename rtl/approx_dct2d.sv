// approx_dct2d: row-parallel 8x8 two-dimensional approximate DCT.
//
// Computes Y = T_p * X * T_p^T for 8x8 blocks of unsigned pixels, where T_p is
// the 14-addition, multiplier-free 8-point DCT approximation (see dct_pkg).
// By separability the 2-D transform is two passes of the same 1-D block: a
// row transform (dct1d), a real-time transposition buffer
// (transpose_buffer) and a column transform (dct1d), as in the 2-D block
// diagram. Both passes use the same approximation.
//
// Interface: a block enters as 8 rows, one per clock with in_valid, row r
// holding pixels x[r][0..7] (PIXEL_W-bit unsigned). Gaps between rows are
// allowed. The result leaves as 8 columns, one per clock with out_valid:
// beat u carries Y[0..7][u] (lane v = Y[v][u]) as signed PIXEL_W+7-bit words,
// exact, with no scaling or rounding. in_ready drops only while the buffer
// flushes the last stored block after the input has gone idle; a row offered
// then is not taken.
//
// Timing: one row per clock in and one column per clock out. With blocks
// back to back, column 0 of a block leaves 14 clocks after its row 0 enters
// (3 for the row transform, 8 in the buffer, 3 for the column transform).
module approx_dct2d #(
  parameter int unsigned PIXEL_W = 8
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic                          in_valid,
  output logic                          in_ready,
  input  logic [PIXEL_W-1:0]            pix  [dct_pkg::N],
  output logic                          out_valid,
  output logic signed [PIXEL_W+6:0]     coef [dct_pkg::N]
);
  import dct_pkg::*;

  localparam int unsigned ROW_IN_W = PIXEL_W + 1;              // pixel as signed
  localparam int unsigned MID_W    = ROW_IN_W + GROWTH_1D;     // row transform out
  localparam int unsigned OUT_W    = MID_W + GROWTH_1D;        // column transform out

  logic signed [ROW_IN_W-1:0] row_in [N];
  logic                       row_valid, row_busy, take;
  logic signed [MID_W-1:0]    row_out [N];
  logic                       tb_in_ready, col_valid;
  logic signed [MID_W-1:0]    col_in  [N];
  logic signed [OUT_W-1:0]    col_out [N];

  assign in_ready = tb_in_ready;
  assign take     = in_valid && in_ready;

  always_comb begin
    for (int i = 0; i < N; i++) row_in[i] = ROW_IN_W'({1'b0, pix[i]});
  end

  dct1d #(.IN_W(ROW_IN_W)) u_row_dct (
    .clk, .rst, .in_valid(take), .x(row_in),
    .out_valid(row_valid), .y(row_out), .busy(row_busy)
  );

  transpose_buffer #(.W(MID_W)) u_transpose (
    .clk, .rst,
    .in_valid (row_valid),
    .in_ready (tb_in_ready),
    .drain_ok (!in_valid && !row_busy),
    .din      (row_out),
    .out_valid(col_valid),
    .dout     (col_in)
  );

  dct1d #(.IN_W(MID_W)) u_col_dct (
    .clk, .rst, .in_valid(col_valid), .x(col_in),
    .out_valid, .y(col_out), .busy()
  );

  assign coef = col_out;

endmodule
