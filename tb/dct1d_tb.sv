// dct1d_tb: self-checking test of the 8-point approximate DCT.
//
// Streams random signed 8-bit vectors (and the extreme vectors that make
// every coefficient reach its largest magnitude) with random valid gaps. Each
// result is compared with T_p * x computed by a plain matrix product in
// dct_ref_pkg, and must leave exactly three clocks after its input (one
// register per factor A1, A11, A12). busy must be high exactly while a
// vector is inside.
module dct1d_tb;
  import dct_ref_pkg::*;
  localparam int W = 8;
  localparam int LAT = 3;

  logic clk = 0, rst = 1, in_valid = 0, out_valid, busy;
  logic signed [W-1:0] x [8];
  logic signed [W+2:0] y [8];
  int checks = 0, failures = 0, cycle = 0, n_out = 0;
  // expected results, kept in a ring of fixed slots
  vec8_t exp_mem [1024];
  int    exp_t   [1024];
  int    wr_idx = 0, rd_idx = 0;
  bit [LAT-1:0] vhist = 0;   // valid of the last LAT inputs

  dct1d dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Scoreboard: sample after every rising edge.
  always @(posedge clk) begin
    cycle++;
    #1;
    if (!rst) begin
      int inflight;
      inflight = $countones(vhist);
      checks++;
      if (busy != (inflight != 0)) begin
        failures++;
        $display("cycle %0d: busy=%0b with %0d vectors inside", cycle, busy, inflight);
      end
      if (out_valid) begin
        vec8_t e;
        int t;
        n_out++;
        checks++;
        if (rd_idx == wr_idx) begin
          failures++;
          $display("cycle %0d: unexpected output", cycle);
        end else begin
          e = exp_mem[rd_idx % 1024];
          t = exp_t[rd_idx % 1024];
          rd_idx++;
          if (cycle - t != LAT) begin
            failures++;
            $display("cycle %0d: latency %0d, expected %0d", cycle, cycle - t, LAT);
          end
          for (int k = 0; k < 8; k++) begin
            checks++;
            if (int'(y[k]) != e[k]) begin
              failures++;
              $display("cycle %0d: X%0d=%0d expected %0d", cycle, k, y[k], e[k]);
            end
          end
        end
      end
    end
  end

  task automatic push(input vec8_t v, input bit valid);
    for (int i = 0; i < 8; i++) x[i] = W'(v[i]);
    in_valid = valid;
    if (valid) begin
      exp_mem[wr_idx % 1024] = dct8(v);
      exp_t[wr_idx % 1024] = cycle;
      wr_idx++;
    end
    vhist = {vhist[LAT-2:0], valid};
    @(posedge clk);
    #2;
  endtask

  initial begin
    vec8_t v;
    int sent;
    sent = 0;
    for (int i = 0; i < 8; i++) x[i] = '0;
    repeat (3) @(posedge clk);
    #2;
    rst = 0;
    // rows of T_p scaled to the input range drive each coefficient to its extreme
    for (int k = 0; k < 8; k++) begin
      for (int n = 0; n < 8; n++) v[n] = (T[k][n] > 0) ? 127 : (T[k][n] < 0 ? -128 : 0);
      push(v, 1); sent++;
      for (int n = 0; n < 8; n++) v[n] = (T[k][n] > 0) ? -128 : (T[k][n] < 0 ? 127 : 0);
      push(v, 1); sent++;
    end
    repeat (4000) begin
      bit vb;
      vb = ($urandom % 5) != 0;
      for (int i = 0; i < 8; i++) v[i] = int'($signed(W'($urandom)));
      push(v, vb);
      if (vb) sent++;
    end
    in_valid = 0;
    repeat (LAT + 2) push(v, 0);
    checks++;
    if (n_out != sent || rd_idx != wr_idx) begin
      failures++;
      $display("sent %0d vectors, received %0d", sent, n_out);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
