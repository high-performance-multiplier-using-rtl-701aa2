// wallace_tree_3_2_tb: checks the Wallace tree of 3:2 compressors.
//
// The full-size tree (43 rows of 252 bits) and small trees of 3, 4, 5, 7
// and 12 rows of 16 bits get random rows, rows of all ones and rows of
// zeros; for each, sum_row + carry_row must equal the sum of the rows,
// worked out here, modulo 2^W.
module wallace_tree_3_2_tb;
  logic clk = 1'b0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  logic [251:0] big_rows [43];
  logic [251:0] big_s, big_c;
  wallace_tree_3_2 dut (.rows(big_rows), .sum_row(big_s), .carry_row(big_c));

  localparam int NS = 5;
  localparam int KS [NS] = '{3, 4, 5, 7, 12};
  logic [15:0] sm_rows [NS][12];
  logic [15:0] sm_s [NS];
  logic [15:0] sm_c [NS];

  for (genvar t = 0; t < NS; t++) begin : g_small
    logic [15:0] r [KS[t]];
    for (genvar k = 0; k < KS[t]; k++) begin : g_r
      assign r[k] = sm_rows[t][k];
    end
    wallace_tree_3_2 #(.K(KS[t]), .W(16)) u_small (
      .rows(r), .sum_row(sm_s[t]), .carry_row(sm_c[t])
    );
  end

  function automatic logic [251:0] rand252();
    logic [255:0] r;
    for (int i = 0; i < 8; i++) r[32*i +: 32] = $urandom;
    return r[251:0];
  endfunction

  task automatic check_all();
    logic [251:0] expb;
    logic [15:0] exps;
    #1;
    expb = '0;
    foreach (big_rows[k]) expb = expb + big_rows[k];
    checks++;
    if (big_s + big_c != expb) begin
      failures++;
      $display("FAIL full-size tree");
    end
    for (int t = 0; t < NS; t++) begin
      exps = '0;
      for (int k = 0; k < KS[t]; k++) exps = exps + sm_rows[t][k];
      checks++;
      if (16'(sm_s[t] + sm_c[t]) != exps) begin
        failures++;
        $display("FAIL %0d-row tree", KS[t]);
      end
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
    for (int n = 0; n < 502; n++) begin
      foreach (big_rows[k]) big_rows[k] = (n == 0) ? '1 : (n == 1) ? '0 : rand252();
      for (int t = 0; t < NS; t++)
        for (int k = 0; k < 12; k++) sm_rows[t][k] = (n == 0) ? '1 : (n == 1) ? '0 : 16'($urandom);
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
