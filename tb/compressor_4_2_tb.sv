// compressor_4_2_tb: exhaustive check of the 4:2 compressor.
//
// For all 32 combinations of x[3:0] and cin it checks
// x0+x1+x2+x3+cin = sum + 2*(carry + cout), and that cout is the same for
// cin = 0 and cin = 1 (cout must not depend on cin, or a row of cells
// would ripple).
module compressor_4_2_tb;
  logic       clk = 1'b0;
  logic [3:0] x;
  logic       cin, sum, carry, cout;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  compressor_4_2 dut (.x(x), .cin(cin), .sum(sum), .carry(carry), .cout(cout));

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic cout0;
      for (int ci = 0; ci < 2; ci++) begin
        x   = 4'(v);
        cin = 1'(ci);
        @(posedge clk);
        checks++;
        if (int'(sum) + 2 * (int'(carry) + int'(cout)) != $countones(x) + ci) begin
          failures++;
          $display("FAIL x=%b cin=%b -> sum=%b carry=%b cout=%b", x, cin, sum, carry, cout);
        end
        if (ci == 0) cout0 = cout;
        else begin
          checks++;
          if (cout != cout0) begin
            failures++;
            $display("FAIL x=%b cout depends on cin", x);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
