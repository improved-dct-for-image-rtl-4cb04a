// image_blocks_tb: compression workload on the 2-D approximate DCT.
//
// Generates a 128x128 8-bit test image (smooth gradients, a bright square
// with sharp edges, a fine texture and a little noise), cuts it into 256
// 8x8 blocks and streams them back to back, one row per clock, through
// approx_dct2d at its default parameters. Checks:
//   * every coefficient equals T_p * X * T_p^T from the reference model;
//   * the stream has no bubble: column j of the whole image leaves exactly
//     14 + j clocks after the first row entered (including the last block,
//     which leaves through a flush pass);
//   * the coefficients invert exactly: X = T^-1 Y T^-T with
//     T^-1 = T^T * diag(1/8,1/2,1/4,1/2,1/8,1/2,1/4,1/2) gives back every pixel.
// It also prints the PSNR of the image rebuilt from the 10 lowest-frequency
// coefficients of each block (zig-zag order), the setting of a JPEG-like
// compression experiment; that figure is reported, not checked.
module image_blocks_tb;
  import dct_ref_pkg::*;
  localparam int PW = 8;
  localparam int IMG = 128;
  localparam int NB  = IMG / 8;
  localparam int NBLK = NB * NB;
  localparam int LAT = 14;
  localparam real NORM [8] = '{8.0, 2.0, 4.0, 2.0, 8.0, 2.0, 4.0, 2.0};
  // first 10 positions of the zig-zag scan, as {row (vertical), column}
  localparam int ZZ [10][2] = '{'{0,0}, '{0,1}, '{1,0}, '{2,0}, '{1,1},
                                '{0,2}, '{0,3}, '{1,2}, '{2,1}, '{3,0}};

  logic clk = 0, rst = 1, in_valid = 0, in_ready, out_valid;
  logic [PW-1:0]        pix  [8];
  logic signed [PW+6:0] coef [8];

  int checks = 0, failures = 0, cycle = 0;
  int img [IMG][IMG];
  int got [NBLK][8][8];            // hardware coefficients, [block][v][u]
  int first_row_cycle = -1, n_col = 0;

  approx_dct2d dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    cycle++;
    if (!rst && out_valid) begin
      checks++;
      if (n_col >= NBLK * 8) begin
        failures++;
      end else begin
        if (cycle != first_row_cycle + LAT + n_col) begin
          failures++;
          $display("column %0d left at clock %0d, expected %0d", n_col,
                   cycle - first_row_cycle, LAT + n_col);
        end
        for (int v = 0; v < 8; v++) got[n_col / 8][v][n_col % 8] = int'(coef[v]);
      end
      n_col++;
    end
  end

  function automatic real rebuild_pixel(input int b, input int r, input int c, input int keep);
    // x[r][c] = sum_v sum_u Tinv[r][v] * Y[v][u] * Tinv[c][u], Tinv[n][k] = T[k][n]/NORM[k]
    real s = 0.0;
    for (int v = 0; v < 8; v++)
      for (int u = 0; u < 8; u++) begin
        bit kept = (keep >= 64);
        for (int z = 0; z < 10; z++)
          if (keep == 10 && ZZ[z][0] == v && ZZ[z][1] == u) kept = 1;
        if (kept)
          s += (real'(T[v][r]) / NORM[v]) * real'(got[b][v][u]) * (real'(T[u][c]) / NORM[u]);
      end
    return s;
  endfunction

  initial begin
    blk8_t x, y;
    real mse, err, psnr;
    // test image
    for (int i = 0; i < IMG; i++)
      for (int j = 0; j < IMG; j++) begin
        real p;
        p = 40.0 + 1.2 * real'(i) + 60.0 * $sin(real'(j) / 11.0) * $cos(real'(i) / 17.0);
        if (i >= 40 && i < 88 && j >= 50 && j < 100) p += 90.0;
        if ((i / 2 + j / 2) % 2 == 0 && j >= 100) p += 20.0;
        p += real'($urandom % 9) - 4.0;
        if (p < 0.0) p = 0.0;
        if (p > 255.0) p = 255.0;
        img[i][j] = int'(p);
      end
    for (int c = 0; c < 8; c++) pix[c] = '0;
    repeat (3) @(posedge clk);
    #2;
    rst = 0;
    // stream the blocks in raster order, back to back
    for (int b = 0; b < NBLK; b++)
      for (int r = 0; r < 8; r++) begin
        for (int c = 0; c < 8; c++) pix[c] = PW'(img[(b / NB) * 8 + r][(b % NB) * 8 + c]);
        in_valid = 1;
        checks++;
        if (!in_ready) failures++;
        if (first_row_cycle < 0) first_row_cycle = cycle + 1;
        @(posedge clk);
        #2;
      end
    in_valid = 0;
    repeat (LAT + 10) @(posedge clk);
    checks++;
    if (n_col != NBLK * 8) begin
      failures++;
      $display("%0d columns came out, expected %0d", n_col, NBLK * 8);
    end
    // coefficients against the reference model
    for (int b = 0; b < NBLK; b++) begin
      for (int r = 0; r < 8; r++)
        for (int c = 0; c < 8; c++) x[r][c] = img[(b / NB) * 8 + r][(b % NB) * 8 + c];
      y = dct8x8(x);
      for (int v = 0; v < 8; v++)
        for (int u = 0; u < 8; u++) begin
          checks++;
          if (got[b][v][u] != y[v][u]) begin
            failures++;
            if (failures < 10)
              $display("block %0d Y[%0d][%0d] = %0d, expected %0d", b, v, u, got[b][v][u], y[v][u]);
          end
        end
    end
    // exact inversion from all 64 coefficients, and PSNR with 10 kept
    mse = 0.0;
    for (int b = 0; b < NBLK; b++)
      for (int r = 0; r < 8; r++)
        for (int c = 0; c < 8; c++) begin
          real px;
          px = real'(img[(b / NB) * 8 + r][(b % NB) * 8 + c]);
          err = rebuild_pixel(b, r, c, 64) - px;
          checks++;
          if (err > 1e-6 || err < -1e-6) failures++;
          err = rebuild_pixel(b, r, c, 10) - px;
          mse += err * err;
        end
    mse = mse / real'(IMG * IMG);
    psnr = 10.0 * $log10(255.0 * 255.0 / mse);
    $display("%0dx%0d image, %0d blocks in %0d clocks; PSNR with 10 of 64 coefficients kept: %0.2f dB",
             IMG, IMG, NBLK, LAT + NBLK * 8, psnr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
