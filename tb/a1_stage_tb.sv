// a1_stage_tb: self-checking test of the input butterfly.
//
// Checks the worked example (inputs 1,5,11,15,17,12,19,14 give sums
// 15,24,23,32 and differences -2,-1,-14,-13), extreme values, then a stream of
// random vectors with random valid gaps. Every output is compared, one clock
// after its input, with sums and differences computed here from the A1
// matrix; out_valid must follow in_valid by exactly one clock.
module a1_stage_tb;
  localparam int W = 8;
  localparam int A1 [8][8] = '{
    '{1,0,0,0, 0,0,0,1}, '{0,1,0,0, 0,0,1,0}, '{0,0,1,0, 0,1,0,0}, '{0,0,0,1, 1,0,0,0},
    '{0,0,0,1,-1,0,0,0}, '{0,0,1,0, 0,-1,0,0}, '{0,1,0,0, 0,0,-1,0}, '{1,0,0,0, 0,0,0,-1}};

  logic clk = 0, rst = 1, in_valid = 0, out_valid;
  logic signed [W-1:0] x [8];
  logic signed [W:0]   u [8];
  int checks = 0, failures = 0, cycle = 0;

  a1_stage dut (.*);

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
    for (int i = 0; i < 8; i++) x[i] = W'(vin[i]);
    in_valid = valid;
    for (int r = 0; r < 8; r++) begin
      e[r] = 0;
      for (int c = 0; c < 8; c++) e[r] += A1[r][c] * vin[c];
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
        if (int'(u[i]) != e[i]) begin
          failures++;
          $display("cycle %0d: u[%0d]=%0d expected %0d", cycle, i, u[i], e[i]);
        end
      end
    end
  endtask

  initial begin
    int vin [8];
    for (int i = 0; i < 8; i++) x[i] = '0;
    repeat (3) @(posedge clk);
    #1;
    // outputs are cleared by reset
    for (int i = 0; i < 8; i++) begin
      checks++;
      if (u[i] != 0) failures++;
    end
    rst = 0;
    vin = '{1, 5, 11, 15, 17, 12, 19, 14};
    drive(vin, 1);
    if (u[0] != 15 || u[1] != 24 || u[2] != 23 || u[3] != 32 ||
        u[4] != -2 || u[5] != -1 || u[6] != -14 || u[7] != -13) failures++;
    checks++;
    vin = '{127, 127, 127, 127, -128, -128, -128, -128};
    drive(vin, 1);
    vin = '{-128, -128, -128, -128, 127, 127, 127, 127};
    drive(vin, 1);
    repeat (3000) begin
      for (int i = 0; i < 8; i++) vin[i] = int'($signed(W'($urandom)));
      drive(vin, ($urandom % 4) != 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
