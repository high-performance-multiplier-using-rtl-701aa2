// compressor_4_2: the 4:2 compressor, built from two 3:2 compressors.
//
// Four bits of one weight and a carry-in from the cell one weight lower are
// reduced to a sum bit of that weight, and a carry bit and a carry-out of
// twice the weight: x[0]+x[1]+x[2]+x[3]+cin = sum + 2*(carry + cout).
// The first 3:2 compressor adds x[0..2]; its carry leaves as cout, so cout
// does not depend on cin and a row of cells has no carry ripple. The second
// 3:2 compressor adds the first one's sum, x[3] and cin. Building the cell
// from two 3:2 compressors follows the source; which inputs go to which
// adder is this design's choice. Timing: purely combinational.
module compressor_4_2 (
  input  logic [3:0] x,
  input  logic       cin,
  output logic       sum,
  output logic       carry,
  output logic       cout
);

  logic s1;

  compressor_3_2 u_first (
    .a(x[0]), .b(x[1]), .c(x[2]),
    .sum(s1), .carry(cout)
  );

  compressor_3_2 u_second (
    .a(s1), .b(x[3]), .c(cin),
    .sum(sum), .carry(carry)
  );

endmodule
