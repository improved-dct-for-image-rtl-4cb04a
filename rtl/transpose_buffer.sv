// transpose_buffer: real-time row-parallel transposition buffer for 8x8 blocks.
//
// Sits between the row transform and the column transform. Row vectors of a
// block arrive one per clock (lane c = element c of row r); the block's
// columns leave one per clock (lane r = row r of column k), while the rows of
// the next block are being written, so a continuous stream of blocks passes
// with no bubble and no second buffer.
//
// How it works: an 8x8 array of registers whose shift direction alternates
// from block to block. In a FILL_COLS pass every clock shifts the array one
// column to the left and writes the new vector into the rightmost column;
// after 8 clocks row j of the block sits in column j. In the following
// FILL_ROWS pass every clock shifts the array one row up and writes the new
// vector into the bottom row; the top row, which leaves the array, is column
// k of the previous block. The pass after that again shifts left, and the
// leftmost column that leaves is column k of the block written by rows. A
// mod-8 counter numbers the clocks of a pass and a 2:1 multiplexer per lane
// picks the leaving column or row. The register array, the counter and the
// multiplexers follow the block diagram of the buffer; the alternating shift
// direction that lets one array serve reading and writing at once is this
// design's choice, since the diagram does not spell out its control.
//
// Flow control (this design's own): a pass advances on every clock with
// in_valid; a gap in the input stalls both the writing and the reading. When
// a complete block is stored, no row arrives at the start of a pass and
// drain_ok says that no more rows are on their way, the buffer runs a flush
// pass of 8 clocks that reads the block out; in_ready is low during it.
//
// Timing: column k of a block leaves 8+k advancing clocks after its row 0
// entered (8 clocks when blocks follow each other back to back).
module transpose_buffer #(
  parameter int unsigned W = 11
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                in_valid,
  output logic                in_ready,
  input  logic                drain_ok,
  input  logic signed [W-1:0] din  [dct_pkg::N],
  output logic                out_valid,
  output logic signed [W-1:0] dout [dct_pkg::N]
);
  import dct_pkg::*;

  logic signed [W-1:0] arr [N][N];      // arr[row][col]
  logic [$clog2(N)-1:0] cnt;            // clock of the current pass
  fill_dir_e            dir;
  pass_kind_e           kind_q, kind;
  logic                 held_valid;     // the array holds a complete block
  logic                 advance;

  always_comb begin
    if (cnt == '0) begin
      if (in_valid)                     kind = PASS_INPUT;
      else if (held_valid && drain_ok)  kind = PASS_FLUSH;
      else                              kind = PASS_IDLE;
      advance = (kind != PASS_IDLE);
    end else begin
      kind    = kind_q;
      advance = (kind_q == PASS_INPUT) ? in_valid : 1'b1;
    end
  end

  assign in_ready  = !((cnt != '0) && (kind_q == PASS_FLUSH));
  assign out_valid = advance && held_valid;

  always_comb begin
    for (int r = 0; r < N; r++)
      dout[r] = (dir == FILL_COLS) ? arr[r][0] : arr[0][r];
  end

  // Control.
  always_ff @(posedge clk) begin
    if (rst) begin
      cnt        <= '0;
      dir        <= FILL_COLS;
      kind_q     <= PASS_IDLE;
      held_valid <= 1'b0;
    end else if (advance) begin
      cnt    <= cnt + 1'b1;
      kind_q <= kind;
      if (cnt == $clog2(N)'(N-1)) begin
        dir        <= (dir == FILL_COLS) ? FILL_ROWS : FILL_COLS;
        held_valid <= (kind == PASS_INPUT);
      end
    end
  end

  // Register array (data only, no reset: every word is written before it is
  // read out with out_valid high).
  always_ff @(posedge clk) begin
    if (advance) begin
      if (dir == FILL_COLS) begin
        for (int r = 0; r < N; r++) begin
          for (int c = 0; c < N-1; c++) arr[r][c] <= arr[r][c+1];
          arr[r][N-1] <= din[r];
        end
      end else begin
        for (int c = 0; c < N; c++) begin
          for (int r = 0; r < N-1; r++) arr[r][c] <= arr[r+1][c];
          arr[N-1][c] <= din[c];
        end
      end
    end
  end

  // Upstream must not present a row while a flush pass runs.
  a_no_row_in_flush: assert property (@(posedge clk) disable iff (rst)
    !(in_valid && !in_ready))
    else $error("transpose_buffer: row presented during a flush pass");

endmodule
