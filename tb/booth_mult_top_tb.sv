// booth_mult_top_tb: end-to-end test of the whole design at its full size
// (126 x 126 multipliers, 8-tap filter), with no parameter overridden.
//
// Both multipliers get corner-case and random operands, plus operands
// built so that every radix-8 digit value occurs; both products are
// compared with the simulator's own signed multiplication. The filter is
// reset, given an impulse and random samples, and compared with a model.
// Each mechanism is counted and must happen at least once: each of the
// nine Booth digit values -4..+4 (the +-3 digits use the hard multiple
// 3X), a negative and a positive product, a filter reset and a full
// impulse response.
module booth_mult_top_tb;
  localparam int M = 126, N = 126, P = 252, ND = 42;
  localparam int TAPS = 8;
  localparam int C [TAPS] = '{-4, 6, 27, 47, 47, 27, 6, -4};

  logic clk = 1'b0;
  logic rst;
  logic [M-1:0] x;
  logic [N-1:0] y;
  logic [P-1:0] p32, p42;
  logic signed [7:0]  fx;
  logic signed [18:0] fy;
  int checks = 0, failures = 0;
  int digit_seen [9];
  int neg_products = 0, pos_products = 0, fir_resets = 0, impulses = 0;
  int hist [TAPS];

  always #5 clk = ~clk;

  booth_mult_top dut (
    .multiplicand(x), .multiplier(y),
    .product_3_2(p32), .product_4_2(p42),
    .clk(clk), .rst(rst), .fir_x(fx), .fir_y(fy)
  );

  function automatic logic [127:0] rand128();
    logic [127:0] r;
    for (int i = 0; i < 4; i++) r[32*i +: 32] = $urandom;
    return r;
  endfunction

  task automatic mult_check();
    logic signed [P-1:0] expv;
    logic [N+1:0] yx;
    #1;
    expv = P'(signed'(x)) * P'(signed'(y));
    checks += 2;
    if (p32 != expv) begin
      failures++;
      $display("FAIL 3:2 multiplier x=%h y=%h", x, y);
    end
    if (p42 != expv) begin
      failures++;
      $display("FAIL 4:2 multiplier x=%h y=%h", x, y);
    end
    if (expv < 0) neg_products++;
    else if (expv > 0) pos_products++;
    yx = {y[N-1], y, 1'b0};
    for (int i = 0; i < ND; i++)
      digit_seen[-4 * yx[3*i+3] + 2 * yx[3*i+2] + yx[3*i+1] + yx[3*i] + 4]++;
  endtask

  task automatic fir_step(input logic signed [7:0] xv, input logic r);
    int expv;
    fx = xv;
    rst = r;
    @(posedge clk);
    if (r) begin
      foreach (hist[k]) hist[k] = 0;
      fir_resets++;
    end else begin
      for (int k = TAPS - 1; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = int'(xv);
    end
    expv = 0;
    for (int k = 0; k < TAPS; k++) expv += C[k] * hist[k];
    #1;
    checks++;
    if (fy != 19'(expv)) begin
      failures++;
      $display("FAIL filter y=%0d expected %0d", fy, expv);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (digit_seen[i]) digit_seen[i] = 0;
    foreach (hist[k]) hist[k] = 0;
    fx = '0;
    rst = 1'b1;

    // Multipliers.
    x = '0;                  y = '0;                  mult_check();
    x = {1'b1, 125'b0};      y = {1'b1, 125'b0};      mult_check();
    x = {1'b0, {125{1'b1}}}; y = {1'b1, 125'b0};      mult_check();
    x = '1;                  y = '1;                  mult_check();
    // Quartets 0000 .. 1111 in turn: every digit value.
    x = 126'(rand128());
    for (int i = 0; i < ND; i++) y[3*i +: 3] = 3'(i);
    mult_check();
    y = ~y;
    mult_check();
    for (int n = 0; n < 500; n++) begin
      x = 126'(rand128());
      y = 126'(rand128());
      mult_check();
    end

    // Filter: reset, impulse, random stream with a reset inside.
    fir_step(0, 1'b1);
    fir_step(1, 1'b0);
    begin
      bit ok = 1'b1;
      for (int k = 1; k < TAPS; k++) begin
        fir_step(0, 1'b0);
        if (fy != 19'(C[k])) ok = 1'b0;
      end
      if (ok) impulses++;
    end
    for (int n = 0; n < 200; n++) fir_step(8'($urandom), (n == 100));

    for (int v = 0; v < 9; v++) begin
      checks++;
      if (digit_seen[v] == 0) begin
        failures++;
        $display("FAIL Booth digit %0d never occurred", v - 4);
      end
    end
    checks += 4;
    if (neg_products == 0) begin failures++; $display("FAIL no negative product"); end
    if (pos_products == 0) begin failures++; $display("FAIL no positive product"); end
    if (fir_resets < 2)    begin failures++; $display("FAIL filter reset not exercised"); end
    if (impulses == 0)     begin failures++; $display("FAIL no clean impulse response"); end
    $display("digits -4..4 seen: %0d %0d %0d %0d %0d %0d %0d %0d %0d",
             digit_seen[0], digit_seen[1], digit_seen[2], digit_seen[3], digit_seen[4],
             digit_seen[5], digit_seen[6], digit_seen[7], digit_seen[8]);
    $display("products negative %0d positive %0d, filter resets %0d, impulse responses %0d",
             neg_products, pos_products, fir_resets, impulses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
