// approx_dct2d_tb: end-to-end test of the 8x8 two-dimensional approximate DCT.
//
// Runs the design at its default parameters (8-bit pixels). Random pixel
// blocks, plus flat blocks (all 0, all 255) and checkerboards that drive
// coefficients to their extremes, enter as rows; every output column is
// compared with Y = T_p * X * T_p^T from a plain matrix product. Phase 1 sends
// blocks back to back and checks that column 0 of a block leaves 14 clocks
// after its row 0 entered and that the stream has no bubble (one column per
// clock). Phase 2 inserts gaps inside blocks (stalls), idle periods that let
// the buffer flush the last block (in_ready low), and offers rows during a
// flush, which must be refused and re-offered. Each mechanism is counted at
// the ports (stalls as gaps inside a block, flushes as in_ready falling,
// refused rows as in_valid without in_ready, back-to-back columns at the
// output) and must occur at least once.
module approx_dct2d_tb;
  import dct_ref_pkg::*;
  localparam int PW = 8;
  localparam int NBLK = 300;

  logic clk = 0, rst = 1, in_valid = 0, in_ready, out_valid;
  logic [PW-1:0]          pix  [8];
  logic signed [PW+6:0]   coef [8];

  int checks = 0, failures = 0, cycle = 0;
  blk8_t blk [NBLK];
  blk8_t ref_y [NBLK];
  int row0_cycle [NBLK];
  int out_blk = 0, out_col = 0, last_out_cycle = 0;
  int n_stall = 0, n_flush = 0, n_refused = 0, n_b2b = 0;
  bit ready_q = 1;

  approx_dct2d dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    cycle++;
    if (!rst) begin
      if (!in_ready && ready_q) n_flush++;
      ready_q = in_ready;
      if (in_valid && !in_ready) n_refused++;
      if (out_valid) begin
        checks++;
        if (out_blk >= NBLK) begin
          failures++;
          $display("cycle %0d: output beyond the last block", cycle);
        end else begin
          if (out_blk < 4) begin
            checks++;
            if (out_col == 0 && cycle - row0_cycle[out_blk] != 14) begin
              failures++;
              $display("block %0d: column 0 after %0d clocks, expected 14",
                       out_blk, cycle - row0_cycle[out_blk]);
            end
            if (out_col != 0 && cycle - last_out_cycle != 1) begin
              failures++;
              $display("block %0d: bubble before column %0d", out_blk, out_col);
            end
            if (out_col != 0) n_b2b++;
          end
          for (int v = 0; v < 8; v++) begin
            checks++;
            if (int'(coef[v]) != ref_y[out_blk][v][out_col]) begin
              failures++;
              $display("cycle %0d: block %0d Y[%0d][%0d] = %0d, expected %0d", cycle,
                       out_blk, v, out_col, coef[v], ref_y[out_blk][v][out_col]);
            end
          end
          last_out_cycle = cycle;
          out_col++;
          if (out_col == 8) begin
            out_col = 0;
            out_blk++;
          end
        end
      end
    end
  end

  task automatic tick();
    @(posedge clk);
    #2;
  endtask

  task automatic idle(input int n);
    in_valid = 0;
    repeat (n) tick();
  endtask

  // Offers row r of block b until it is taken; gap_pct inserts idle clocks.
  task automatic send_block(input int b, input int gap_pct);
    for (int r = 0; r < 8; r++) begin
      bit taken;
      while (($urandom % 100) < gap_pct) begin
        if (r != 0) n_stall++;
        idle(1);
      end
      for (int c = 0; c < 8; c++) pix[c] = PW'(blk[b][r][c]);
      in_valid = 1;
      taken = 0;
      while (!taken) begin
        taken = in_ready;
        if (taken && r == 0) row0_cycle[b] = cycle + 1;
        tick();
      end
    end
    in_valid = 0;
  endtask

  initial begin
    for (int b = 0; b < NBLK; b++)
      for (int r = 0; r < 8; r++)
        for (int c = 0; c < 8; c++)
          blk[b][r][c] = $urandom % (1 << PW);
    for (int r = 0; r < 8; r++)
      for (int c = 0; c < 8; c++) begin
        blk[5][r][c] = 0;
        blk[6][r][c] = (1 << PW) - 1;
        blk[7][r][c] = ((r + c) % 2 != 0) ? (1 << PW) - 1 : 0;
        blk[8][r][c] = ((r / 2 + c / 2) % 2 != 0) ? 0 : (1 << PW) - 1;
      end
    for (int b = 0; b < NBLK; b++) ref_y[b] = dct8x8(blk[b]);
    for (int c = 0; c < 8; c++) pix[c] = '0;
    repeat (3) tick();
    rst = 0;
    // phase 1: back to back
    for (int b = 0; b < 5; b++) send_block(b, 0);
    // phase 2
    for (int b = 5; b < NBLK; b++) begin
      int mode;
      mode = $urandom % 6;
      send_block(b, (mode == 0) ? 25 : 0);
      if (mode == 1) idle(1 + $urandom % 16);
      else if (mode == 2) begin
        // let a flush start, then offer the next block's first row at once
        idle(4);
      end
    end
    idle(40);
    checks++;
    if (out_blk != NBLK) begin
      failures++;
      $display("%0d blocks came out, %0d sent", out_blk, NBLK);
    end
    // flat-block sanity: only the DC coefficient is non-zero
    checks++;
    if (ref_y[6][0][0] != 64 * 255 || ref_y[6][1][0] != 0) failures++;
    $display("stall clocks %0d, flushes %0d, refused rows %0d, back-to-back columns %0d",
             n_stall, n_flush, n_refused, n_b2b);
    checks += 4;
    if (n_stall == 0)   failures++;
    if (n_flush == 0)   failures++;
    if (n_refused == 0) failures++;
    if (n_b2b == 0)     failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
