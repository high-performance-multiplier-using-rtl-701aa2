// fir_filter_tb: checks the FIR filter against a model kept here.
//
// After reset it feeds an impulse (which must bring out the coefficients,
// one per cycle, the first on the edge that samples the impulse), then a
// step of the most negative sample, then random samples, with a reset in
// the middle of the stream. Every cycle y is compared with
// sum COEFFS[k] * x[n-k] over the samples since the last reset. A second
// filter, built on the 3:2-tree multiplier, runs on the same stream.
module fir_filter_tb;
  localparam int TAPS = 8;
  localparam int C [TAPS] = '{-4, 6, 27, 47, 47, 27, 6, -4};

  logic clk = 1'b0;
  logic rst;
  logic signed [7:0]  x;
  logic signed [18:0] y, y32;
  int checks = 0, failures = 0;
  int hist [TAPS];

  always #5 clk = ~clk;

  fir_filter dut (.clk(clk), .rst(rst), .x(x), .y(y));
  fir_filter #(.TREE(booth_pkg::TREE_3_2)) dut32 (.clk(clk), .rst(rst), .x(x), .y(y32));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Apply one sample (or a reset) for one clock and check y after the edge.
  task automatic step(input logic signed [7:0] xv, input logic r);
    int expv;
    x = xv;
    rst = r;
    @(posedge clk);
    if (r) foreach (hist[k]) hist[k] = 0;
    else begin
      for (int k = TAPS - 1; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = int'(xv);
    end
    expv = 0;
    for (int k = 0; k < TAPS; k++) expv += C[k] * hist[k];
    #1;
    checks++;
    if (y != 19'(expv)) begin
      failures++;
      $display("FAIL x=%0d y=%0d expected %0d", xv, y, expv);
    end
    checks++;
    if (y32 != 19'(expv)) begin
      failures++;
      $display("FAIL 3:2 variant x=%0d y=%0d expected %0d", xv, y32, expv);
    end
  endtask

  initial begin
    x = '0;
    rst = 1'b1;
    foreach (hist[k]) hist[k] = 0;
    step(0, 1'b1);
    step(1, 1'b0);
    for (int k = 0; k < TAPS + 2; k++) step(0, 1'b0);
    for (int k = 0; k < TAPS + 2; k++) step(-128, 1'b0);
    for (int k = 0; k < TAPS + 2; k++) step(127, 1'b0);
    for (int n = 0; n < 300; n++) step(8'($urandom), (n == 150));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
