// a11_stage_tb: self-checking test of the input butterfly.
//
// Checks the worked example (inputs 1,5,11,15,17,12,19,14 give sums
// 15,24,23,32 and differences -2,-1,-14,-13), extreme values, then a stream of
// random vectors with random valid gaps. Every output is compared, one clock
// after its input, with sums and differences computed here from the A1
// matrix; out_valid must follow in_valid by exactly one clock.
module a11_stage_tb;
  localparam int W = 9;
  localparam int A11 [8][8] = '{
    '{1,0,0,1, 0,0,0,0}, '{0,1,1,0, 0,0,0,0}, '{0,1,-1,0, 0,0,0,0}, '{1,0,0,-1, 0,0,0,0},
    '{0,0,0,0, 1,0,0,0}, '{0,0,0,0, 0,1,0,0}, '{0,0,0,0, 0,0,1,0}, '{0,0,0,0, 0,0,0,1}};

  logic clk = 0, rst = 1, in_valid = 0, out_valid;
  logic signed [W-1:0] u [8];
  logic signed [W:0]   v [8];
  int checks = 0, failures = 0, cycle = 0;

  a11_stage dut (.*);

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
    for (int i = 0; i < 8; i++) u[i] = W'(vin[i]);
    in_valid = valid;
    for (int r = 0; r < 8; r++) begin
      e[r] = 0;
      for (int c = 0; c < 8; c++) e[r] += A11[r][c] * vin[c];
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
        if (int'(v[i]) != e[i]) begin
          failures++;
          $display("cycle %0d: v[%0d]=%0d expected %0d", cycle, i, v[i], e[i]);
        end
      end
    end
  endtask

  initial begin
    int vin [8];
    for (int i = 0; i < 8; i++) u[i] = '0;
    repeat (3) @(posedge clk);
    #1;
    // outputs are cleared by reset
    for (int i = 0; i < 8; i++) begin
      checks++;
      if (v[i] != 0) failures++;
    end
    rst = 0;
    vin = '{1, 4, 23, 7, 29, 9, 12, 11};
    drive(vin, 1);
    if (v[0] != 8 || v[1] != 27 || v[2] != -19 || v[3] != -6 ||
        v[4] != 29 || v[5] != 9 || v[6] != 12 || v[7] != 11) failures++;
    checks++;
    vin = '{255, 255, 255, 255, -256, -256, -256, -256};
    drive(vin, 1);
    vin = '{255, -256, -256, 255, -256, 255, -256, 255};
    drive(vin, 1);
    repeat (3000) begin
      for (int i = 0; i < 8; i++) vin[i] = int'($signed(W'($urandom)));
      drive(vin, ($urandom % 4) != 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
