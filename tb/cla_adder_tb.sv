// cla_adder_tb: checks the carry look-ahead adder.
//
// An 8-bit instance is checked exhaustively (all a, b and cin); a 252-bit
// instance, the width of the full-size multiplier, with random operands
// and with carry chains that run across the whole word.
module cla_adder_tb;
  logic clk = 1'b0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  logic [7:0]   a8, b8, s8;
  logic         ci8, co8;
  logic [251:0] aw, bw, sw;
  logic         ciw, cow;

  cla_adder #(.WIDTH(8))   dut8 (.a(a8), .b(b8), .cin(ci8), .sum(s8), .cout(co8));
  cla_adder                dutw (.a(aw), .b(bw), .cin(ciw), .sum(sw), .cout(cow));

  function automatic logic [251:0] rand252();
    logic [255:0] r;
    for (int i = 0; i < 8; i++) r[32*i +: 32] = $urandom;
    return r[251:0];
  endfunction

  task automatic check_wide();
    logic [252:0] expv;
    #1;
    expv = {1'b0, aw} + {1'b0, bw} + 253'(ciw);
    checks++;
    if ({cow, sw} != expv) begin
      failures++;
      $display("FAIL wide a=%h b=%h cin=%b", aw, bw, ciw);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    aw = '0; bw = '0; ciw = 1'b0;
    for (int i = 0; i < 512; i++) begin
      for (int j = 0; j < 256; j++) begin
        {ci8, a8} = 9'(i);
        b8 = 8'(j);
        #1;
        checks++;
        if ({co8, s8} != 9'(a8) + 9'(b8) + 9'(ci8)) begin
          failures++;
          $display("FAIL a=%0d b=%0d cin=%0d -> %0d", a8, b8, ci8, {co8, s8});
        end
      end
    end
    // Full-length carry chains.
    aw = '1; bw = '0; ciw = 1'b1; check_wide();
    aw = '1; bw = '1; ciw = 1'b1; check_wide();
    aw = {1'b0, {251{1'b1}}}; bw = 252'd1; ciw = 1'b0; check_wide();
    for (int n = 0; n < 2000; n++) begin
      aw = rand252();
      bw = rand252();
      ciw = 1'($urandom);
      if (n % 4 == 1) bw = ~aw;  // all-propagate operands
      check_wide();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
