// transpose_buffer_tb: self-checking test of the transposition buffer.
//
// Writes random 8x8 blocks as row vectors and checks that every block comes
// out as its 8 columns, in order, lane r = row r. Phase 1 sends blocks back
// to back and checks that column 0 of a block leaves exactly 8 clocks after
// its row 0 entered, with both shift directions in use. Phase 2 mixes random
// gaps inside blocks (stalls), idle periods with and without drain_ok (flush
// passes and waiting) and extreme values. in_ready is honoured. The test
// counts, from the ports, stalls (gaps inside a block), flush passes (in_ready
// low) and passes (blocks written plus flushes; consecutive passes use
// opposite shift directions, so two or more cover both) and fails if one of
// them never happened.
module transpose_buffer_tb;
  localparam int W = 11;
  localparam int NBLK = 400;

  logic clk = 0, rst = 1, in_valid = 0, in_ready, drain_ok = 0, out_valid;
  logic signed [W-1:0] din  [8];
  logic signed [W-1:0] dout [8];

  int checks = 0, failures = 0, cycle = 0;
  int blk [NBLK][8][8];
  int row0_cycle [NBLK];
  int out_blk = 0, out_col = 0;
  int n_stall = 0, n_flush = 0, n_pass = 0;
  bit ready_q = 1;

  transpose_buffer dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Scoreboard, sampled mid-cycle when inputs and outputs are settled.
  always @(negedge clk) begin
    cycle++;
    if (!rst) begin
      if (!in_ready && ready_q) n_flush++;
      ready_q = in_ready;
      if (out_valid) begin
        checks++;
        if (out_blk >= NBLK) begin
          failures++;
          $display("cycle %0d: output beyond the last block", cycle);
        end else begin
          if (out_col == 0 && out_blk < 4) begin
            checks++;
            if (cycle - row0_cycle[out_blk] != 8) begin
              failures++;
              $display("block %0d: column 0 after %0d clocks, expected 8",
                       out_blk, cycle - row0_cycle[out_blk]);
            end
          end
          for (int r = 0; r < 8; r++) begin
            checks++;
            if (int'(dout[r]) != blk[out_blk][r][out_col]) begin
              failures++;
              $display("cycle %0d: block %0d column %0d lane %0d = %0d, expected %0d",
                       cycle, out_blk, out_col, r, dout[r], blk[out_blk][r][out_col]);
            end
          end
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

  task automatic idle(input int n, input bit drain);
    in_valid = 0;
    drain_ok = drain;
    repeat (n) tick();
  endtask

  task automatic send_block(input int b, input int gap_pct);
    for (int r = 0; r < 8; r++) begin
      drain_ok = 0;
      while (($urandom % 100) < gap_pct) begin
        in_valid = 0;
        if (r != 0) n_stall++;
        tick();
      end
      in_valid = 0;
      while (!in_ready) tick();
      for (int c = 0; c < 8; c++) din[c] = W'(blk[b][r][c]);
      in_valid = 1;
      if (r == 0) row0_cycle[b] = cycle + 1;
      tick();
    end
    in_valid = 0;
  endtask

  initial begin
    for (int b = 0; b < NBLK; b++)
      for (int r = 0; r < 8; r++)
        for (int c = 0; c < 8; c++)
          blk[b][r][c] = int'($signed(W'($urandom)));
    // extreme values
    for (int r = 0; r < 8; r++)
      for (int c = 0; c < 8; c++) begin
        blk[10][r][c] = ((r + c) % 2 != 0) ? -(1 << (W-1)) : (1 << (W-1)) - 1;
        blk[11][r][c] = (r == c) ? -(1 << (W-1)) : 0;
      end
    for (int c = 0; c < 8; c++) din[c] = '0;
    repeat (3) tick();
    checks++;
    if (out_valid) failures++;
    rst = 0;
    // phase 1: back to back
    for (int b = 0; b < 5; b++) send_block(b, 0);
    // phase 2: random gaps, idles, flushes
    for (int b = 5; b < NBLK; b++) begin
      int mode;
      mode = $urandom % 6;
      send_block(b, (mode == 0) ? 30 : 0);
      if (mode == 1) idle(1 + $urandom % 12, 1);
      else if (mode == 2) idle(1 + $urandom % 5, 0);
    end
    idle(20, 1);
    checks++;
    if (out_blk != NBLK) begin
      failures++;
      $display("%0d blocks came out, %0d sent", out_blk, NBLK);
    end
    n_pass = out_blk + n_flush;
    $display("stall clocks %0d, flush passes %0d, passes %0d", n_stall, n_flush, n_pass);
    checks += 3;
    if (n_stall == 0) failures++;
    if (n_flush == 0) failures++;
    if (n_pass < 2)   failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
