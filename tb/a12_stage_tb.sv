// a12_stage_tb: self-checking test of the last stage of the 1-D transform.
//
// Feeds the outputs of the A12 worked example (8,27,-19,-6,29,9,12,11, giving
// 35,-19,19,-6,29,9,12,11), extreme values including the most negative input
// on the negated lane, then random vectors with random valid gaps. Every
// output is compared, one clock after its input, with the product of the A12
// matrix written out here; out_valid must follow in_valid by one clock.
module a12_stage_tb;
  localparam int W = 10;
  localparam int A12 [8][8] = '{
    '{1,1,0,0, 0,0,0,0}, '{1,-1,0,0, 0,0,0,0}, '{0,0,-1,0, 0,0,0,0}, '{0,0,0,1, 0,0,0,0},
    '{0,0,0,0, 1,0,0,0}, '{0,0,0,0, 0,1,0,0}, '{0,0,0,0, 0,0,1,0}, '{0,0,0,0, 0,0,0,1}};

  logic clk = 0, rst = 1, in_valid = 0, out_valid;
  logic signed [W-1:0] v [8];
  logic signed [W:0]   w [8];
  int checks = 0, failures = 0, cycle = 0;

  a12_stage dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic drive(input int vin [8], input bit valid);
    int e [8];
    for (int i = 0; i < 8; i++) v[i] = W'(vin[i]);
    in_valid = valid;
    for (int r = 0; r < 8; r++) begin
      e[r] = 0;
      for (int c = 0; c < 8; c++) e[r] += A12[r][c] * vin[c];
    end
    @(posedge clk);
    #1;
    checks++;
    if (out_valid !== valid) begin
      failures++;
      $display("cycle %0d: out_valid %0b expected %0b", cycle, out_valid, valid);
    end
    if (valid) begin
      for (int i = 0; i < 8; i++) begin
        checks++;
        if (int'(w[i]) != e[i]) begin
          failures++;
          $display("cycle %0d: w[%0d]=%0d expected %0d", cycle, i, w[i], e[i]);
        end
      end
    end
  endtask

  initial begin
    int vin [8];
    for (int i = 0; i < 8; i++) v[i] = '0;
    repeat (3) @(posedge clk);
    #1;
    // outputs are cleared by reset
    for (int i = 0; i < 8; i++) begin
      checks++;
      if (w[i] != 0) failures++;
    end
    rst = 0;
    vin = '{8, 27, -19, -6, 29, 9, 12, 11};
    drive(vin, 1);
    if (w[0] != 35 || w[1] != -19 || w[2] != 19 || w[3] != -6 ||
        w[4] != 29 || w[5] != 9 || w[6] != 12 || w[7] != 11) failures++;
    checks++;
    vin = '{511, 511, -512, 511, -512, 511, -512, 511};
    drive(vin, 1);
    vin = '{-512, -512, 511, -512, 511, -512, 511, -512};
    drive(vin, 1);
    repeat (3000) begin
      for (int i = 0; i < 8; i++) vin[i] = int'($signed(W'($urandom)));
      drive(vin, ($urandom % 4) != 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
