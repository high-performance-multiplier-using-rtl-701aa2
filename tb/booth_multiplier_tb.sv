// booth_multiplier_tb: checks the signed radix-8 Booth multiplier.
//
// Six instances: the full 126 x 126 size with the 4:2 tree (the
// default) and with the 3:2 tree, a 6 x 7 multiplier with each tree, and a
// 16 x 15 multiplier (31 input and 31 output bits) with each tree. The
// 6 x 7 ones are checked exhaustively, the others with corner cases (most
// negative values, all ones, zero) and random operands. The
// reference product is the simulator's own signed multiplication.
module booth_multiplier_tb;
  import booth_pkg::*;

  logic clk = 1'b0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  logic [125:0] x, y;
  logic [251:0] p42, p32;
  logic [5:0]   xs;
  logic [6:0]   ys;
  logic [12:0]  ps42, ps32;
  logic [15:0]  xm;
  logic [14:0]  ym;
  logic [30:0]  pm42, pm32;

  booth_multiplier                                  dut42 (.multiplicand(x), .multiplier(y), .product(p42));
  booth_multiplier #(.TREE(TREE_3_2))               dut32 (.multiplicand(x), .multiplier(y), .product(p32));
  booth_multiplier #(.M(6), .N(7))                  sm42  (.multiplicand(xs), .multiplier(ys), .product(ps42));
  booth_multiplier #(.M(6), .N(7), .TREE(TREE_3_2)) sm32  (.multiplicand(xs), .multiplier(ys), .product(ps32));
  booth_multiplier #(.M(16), .N(15))                  md42  (.multiplicand(xm), .multiplier(ym), .product(pm42));
  booth_multiplier #(.M(16), .N(15), .TREE(TREE_3_2)) md32  (.multiplicand(xm), .multiplier(ym), .product(pm32));

  function automatic logic [127:0] rand128();
    logic [127:0] r;
    for (int i = 0; i < 4; i++) r[32*i +: 32] = $urandom;
    return r;
  endfunction

  task automatic check_big();
    logic signed [251:0] expv;
    #1;
    expv = 252'(signed'(x)) * 252'(signed'(y));
    checks += 2;
    if (p42 != expv) begin
      failures++;
      $display("FAIL 4:2 x=%h y=%h", x, y);
    end
    if (p32 != expv) begin
      failures++;
      $display("FAIL 3:2 x=%h y=%h", x, y);
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
    x = '0; y = '0;
    for (int i = 0; i < 64; i++) begin
      for (int j = 0; j < 128; j++) begin
        int expv;
        xs = 6'(i);
        ys = 7'(j);
        #1;
        expv = int'(signed'(xs)) * int'(signed'(ys));
        checks += 2;
        if (ps42 != 13'(expv)) begin
          failures++;
          $display("FAIL 6x7 4:2 %0d * %0d", signed'(xs), signed'(ys));
        end
        if (ps32 != 13'(expv)) begin
          failures++;
          $display("FAIL 6x7 3:2 %0d * %0d", signed'(xs), signed'(ys));
        end
      end
    end
    for (int n = 0; n < 3000; n++) begin
      longint expv;
      xm = (n == 0) ? 16'h8000 : (n == 1) ? 16'hffff : 16'($urandom);
      ym = (n == 0) ? 15'h4000 : (n == 1) ? 15'h7fff : 15'($urandom);
      #1;
      expv = longint'(signed'(xm)) * longint'(signed'(ym));
      checks += 2;
      if (pm42 != 31'(expv) || pm32 != 31'(expv)) begin
        failures++;
        $display("FAIL 16x15 %0d * %0d", signed'(xm), signed'(ym));
      end
    end
    x = {1'b1, 125'b0}; y = {1'b1, 125'b0}; check_big();
    x = '1;             y = {1'b1, 125'b0}; check_big();
    x = {1'b0, {125{1'b1}}}; y = {1'b0, {125{1'b1}}}; check_big();
    x = '1;             y = '1;             check_big();
    x = 126'd1;         y = '0;             check_big();
    for (int n = 0; n < 1000; n++) begin
      x = 126'(rand128());
      y = 126'(rand128());
      check_big();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
