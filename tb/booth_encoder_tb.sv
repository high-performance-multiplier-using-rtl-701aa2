// booth_encoder_tb: exhaustive check of the radix-8 Booth recoding.
//
// All 16 quartets {y[i+2], y[i+1], y[i], y[i-1]} are applied and the digit
// is compared with -4*y[i+2] + 2*y[i+1] + y[i] + y[i-1], worked out here.
// A zero digit must not carry the sign flag.
module booth_encoder_tb;
  import booth_pkg::*;

  logic         clk = 1'b0;
  logic [3:0]   quartet;
  booth_digit_t digit;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  booth_encoder dut (.quartet(quartet), .digit(digit));

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int q = 0; q < 16; q++) begin
      int expv, gotv;
      quartet = 4'(q);
      @(posedge clk);
      expv = -4 * q[3] + 2 * q[2] + q[1] + q[0];
      gotv = digit.neg ? -int'(digit.mag) : int'(digit.mag);
      checks++;
      if (gotv != expv || (expv == 0 && digit.neg) || digit.mag > 4) begin
        failures++;
        $display("FAIL quartet=%b digit neg=%b mag=%0d expected %0d", quartet, digit.neg, digit.mag, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
