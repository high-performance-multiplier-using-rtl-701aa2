// booth_pp_gen_tb: checks the radix-8 partial product generator at its
// full 126 x 126 size.
//
// For random and corner-case operands it works out each Booth digit d_i
// from the multiplier bits here, then checks that partial product row i,
// plus its correction bit at position 3i, equals d_i * X * 8^i, and that
// all rows together add up to X * Y, modulo 2^252. It also counts how
// often each digit value -4..+4 occurred.
module booth_pp_gen_tb;
  localparam int M  = 126;
  localparam int N  = 126;
  localparam int P  = M + N;
  localparam int ND = 42;

  logic clk = 1'b0;
  int checks = 0, failures = 0;
  int seen [9];

  always #5 clk = ~clk;

  logic [M-1:0] x;
  logic [N-1:0] y;
  logic [P-1:0] rows [ND+1];

  booth_pp_gen dut (.multiplicand(x), .multiplier(y), .rows(rows));

  function automatic logic [127:0] rand128();
    logic [127:0] r;
    for (int i = 0; i < 4; i++) r[32*i +: 32] = $urandom;
    return r;
  endfunction

  task automatic check_once();
    logic signed [P-1:0] xs, ys, total, expv, d;
    logic [N+1:0] yx;
    #1;
    xs = P'(signed'(x));
    ys = P'(signed'(y));
    yx = {y[N-1], y, 1'b0};  // 3*ND = N: one sign bit above is enough
    total = '0;
    for (int i = 0; i < ND; i++) begin
      int dv;
      dv = -4 * yx[3*i+3] + 2 * yx[3*i+2] + yx[3*i+1] + yx[3*i];
      seen[dv+4]++;
      d = P'(dv);
      expv = (d * xs) << (3 * i);
      checks++;
      if (rows[i] + (P'(rows[ND][3*i]) << (3 * i)) != expv) begin
        failures++;
        $display("FAIL row %0d digit %0d", i, dv);
      end
      total = total + rows[i];
    end
    total = total + rows[ND];
    checks++;
    if (total != xs * ys) begin
      failures++;
      $display("FAIL sum of rows x=%h y=%h", x, y);
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
    foreach (seen[i]) seen[i] = 0;
    x = '0; y = '0; check_once();
    x = {1'b1, {(M-1){1'b0}}}; y = {1'b1, {(N-1){1'b0}}}; check_once();
    x = '1; y = '1; check_once();
    x = {1'b0, {(M-1){1'b1}}}; y = {N/3{3'b011}}; check_once();
    for (int n = 0; n < 300; n++) begin
      x = M'(rand128());
      y = N'(rand128());
      check_once();
    end
    for (int v = 0; v < 9; v++) begin
      checks++;
      if (seen[v] == 0) begin
        failures++;
        $display("FAIL digit %0d never produced", v - 4);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
