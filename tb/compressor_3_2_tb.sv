// compressor_3_2_tb: exhaustive check of the 3:2 compressor,
// a + b + c = sum + 2*carry for all eight input combinations.
module compressor_3_2_tb;
  logic clk = 1'b0;
  logic a, b, c, sum, carry;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  compressor_3_2 dut (.a(a), .b(b), .c(c), .sum(sum), .carry(carry));

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      @(posedge clk);
      checks++;
      if (int'(sum) + 2 * int'(carry) != int'(a) + int'(b) + int'(c)) begin
        failures++;
        $display("FAIL %b%b%b -> sum=%b carry=%b", a, b, c, sum, carry);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
