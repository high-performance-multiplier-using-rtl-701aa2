// booth_mult_top: the two radix-8 Booth multipliers and the FIR filter.
//
// Two signed M x N multipliers share the operand inputs: one reduces its
// partial products with a Wallace tree of 3:2 compressors, the other with a
// tree of 4:2 compressors; both end in a carry look-ahead adder and give
// the same exact product. Beside them stands an 8-tap FIR filter whose tap
// products come from small Booth multipliers of the 4:2 kind. The pairing
// of the two multiplier variants and the filter follows the source; the
// shared operands and the filter's size are this design's choices.
//
// Interface: multiplicand/multiplier in, product_3_2/product_4_2 out
// (combinational); clk, rst, fir_x in and fir_y out for the filter (one
// cycle of latency, synchronous active-high reset).
module booth_mult_top
  import booth_pkg::*;
#(
  parameter int unsigned M = 126,  // multiplicand width
  parameter int unsigned N = 126   // multiplier width
) (
  input  logic [M-1:0]         multiplicand,
  input  logic [N-1:0]         multiplier,
  output logic [M+N-1:0]       product_3_2,
  output logic [M+N-1:0]       product_4_2,
  input  logic                 clk,
  input  logic                 rst,
  input  logic signed [7:0]    fir_x,
  output logic signed [18:0]   fir_y
);

  booth_multiplier #(.M(M), .N(N), .TREE(TREE_3_2)) u_mul_3_2 (
    .multiplicand(multiplicand),
    .multiplier  (multiplier),
    .product     (product_3_2)
  );

  booth_multiplier #(.M(M), .N(N), .TREE(TREE_4_2)) u_mul_4_2 (
    .multiplicand(multiplicand),
    .multiplier  (multiplier),
    .product     (product_4_2)
  );

  fir_filter #(.XW(8), .YW(19), .TREE(TREE_4_2)) u_fir (
    .clk(clk), .rst(rst), .x(fir_x), .y(fir_y)
  );

endmodule
