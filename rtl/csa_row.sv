// csa_row: a row of 3:2 compressors (a carry-save adder) across W bits.
//
// Three W-bit rows are reduced to two: sum_row holds the per-bit sums and
// carry_row the per-bit carries moved one place to the left, so that
// a + b + c = sum_row + carry_row modulo 2^W (the carry out of bit W-1 is
// dropped). No carry travels along the row: the delay is that of one full
// adder. Timing: purely combinational.
module csa_row #(
  parameter int unsigned W = 252
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] sum_row,
  output logic [W-1:0] carry_row
);

  logic [W-1:0] cy;

  for (genvar j = 0; j < W; j++) begin : g_bit
    compressor_3_2 u_fa (
      .a(a[j]), .b(b[j]), .c(c[j]),
      .sum(sum_row[j]), .carry(cy[j])
    );
  end

  // The carry of the top bit leaves the W-bit result and is not used.
  assign carry_row = {cy[W-2:0], 1'b0};

endmodule
