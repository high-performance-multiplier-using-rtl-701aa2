// compressor_4_2_row: a row of 4:2 compressors across W bits.
//
// Four W-bit rows are reduced to two, a + b + c + d = sum_row + carry_row
// modulo 2^W. Each cell's cout goes to the cin of the cell one bit higher;
// since a cell's cout does not depend on its cin, this link does not
// ripple. The carry and the cout of bit W-1 leave the W-bit result and are
// dropped. Timing: purely combinational.
module compressor_4_2_row #(
  parameter int unsigned W = 252
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  input  logic [W-1:0] d,
  output logic [W-1:0] sum_row,
  output logic [W-1:0] carry_row
);

  logic [W-1:0] cy;    // carry of each cell, weight 2
  logic [W-1:0] cout;  // carry to the next cell, weight 2
  logic [W-1:0] cin;

  assign cin = {cout[W-2:0], 1'b0};

  for (genvar j = 0; j < W; j++) begin : g_bit
    compressor_4_2 u_c42 (
      .x({d[j], c[j], b[j], a[j]}), .cin(cin[j]),
      .sum(sum_row[j]), .carry(cy[j]), .cout(cout[j])
    );
  end

  assign carry_row = {cy[W-2:0], 1'b0};

endmodule
