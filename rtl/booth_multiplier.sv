// booth_multiplier: signed M x N radix-8 Booth multiplier.
//
// The multiplication runs through four stages:
//   1. Booth encoding: the multiplier is recoded into ceil(N/3) radix-8
//      digits in {0, +-1, +-2, +-3, +-4}, which cuts the number of partial
//      products to a third;
//   2. partial product generation: each digit selects 0, X, 2X, 3X or 4X of
//      the multiplicand, inverted for a negative digit (booth_pp_gen);
//   3. a Wallace tree reduces the partial products (plus one row of
//      two's-complement corrections) to two rows, with 3:2 compressors
//      (TREE_3_2) or 4:2 compressors (TREE_4_2);
//   4. a carry look-ahead adder adds the two rows into the product.
// The two tree variants and this four-stage structure follow the source;
// the 4:2 tree is the default. Both operands and the product are two's
// complement; the product is exact (M+N bits).
//
// Interface: multiplicand (M bits), multiplier (N bits), product (M+N).
// Timing: purely combinational, no clock; add registers around it as the
// surrounding design needs.
module booth_multiplier
  import booth_pkg::*;
#(
  parameter int unsigned M    = 126,      // multiplicand width
  parameter int unsigned N    = 126,      // multiplier width
  parameter tree_e       TREE = TREE_4_2  // compressor used in the tree
) (
  input  logic [M-1:0]   multiplicand,
  input  logic [N-1:0]   multiplier,
  output logic [M+N-1:0] product
);

  localparam int unsigned P = M + N;
  localparam int unsigned K = num_digits(N) + 1;  // partial products + corrections

  logic [P-1:0] rows [K];
  logic [P-1:0] sum_row, carry_row;

  booth_pp_gen #(.M(M), .N(N)) u_ppgen (
    .multiplicand(multiplicand),
    .multiplier  (multiplier),
    .rows        (rows)
  );

  if (TREE == TREE_4_2) begin : g_tree42
    wallace_tree_4_2 #(.K(K), .W(P)) u_tree (
      .rows(rows), .sum_row(sum_row), .carry_row(carry_row)
    );
  end else begin : g_tree32
    wallace_tree_3_2 #(.K(K), .W(P)) u_tree (
      .rows(rows), .sum_row(sum_row), .carry_row(carry_row)
    );
  end

  // The carry out is beyond the product width: the signed product always
  // fits in M+N bits.
  cla_adder #(.WIDTH(P)) u_cla (
    .a(sum_row), .b(carry_row), .cin(1'b0), .sum(product), .cout()
  );

endmodule
