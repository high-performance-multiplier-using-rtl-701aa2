// wallace_tree_3_2: Wallace tree of 3:2 compressors.
//
// K rows of W bits are reduced to two rows whose sum equals the sum of all
// K rows modulo 2^W. At each level the rows are taken in groups of three
// and each group passes through a row of 3:2 compressors (csa_row), which
// turns it into a sum row and a carry row; the one or two rows left over
// go to the next level unchanged. r rows become 2*floor(r/3) + r mod 3, so
// about log(K/2)/log(3/2) levels are needed (9 levels for K = 43). The
// grouping by threes in order is this design's choice.
//
// Interface: rows in; sum_row and carry_row out, to be added by the final
// carry look-ahead adder. Timing: purely combinational.
module wallace_tree_3_2
  import booth_pkg::*;
#(
  parameter int unsigned K = 43,   // rows to add
  parameter int unsigned W = 252   // row width
) (
  input  logic [W-1:0] rows [K],
  output logic [W-1:0] sum_row,
  output logic [W-1:0] carry_row
);

  localparam int unsigned LEVELS = levels_3_2(K);

  for (genvar l = 0; l <= LEVELS; l++) begin : g_lvl
    localparam int unsigned R = rows_at_level_3_2(K, l);
    logic [W-1:0] r [R];

    if (l == 0) begin : g_in
      assign r = rows;
    end else begin : g_red
      localparam int unsigned RP = rows_at_level_3_2(K, l - 1);
      localparam int unsigned G  = RP / 3;
      for (genvar g = 0; g < G; g++) begin : g_grp
        csa_row #(.W(W)) u_csa (
          .a(g_lvl[l-1].r[3*g]), .b(g_lvl[l-1].r[3*g+1]), .c(g_lvl[l-1].r[3*g+2]),
          .sum_row(r[2*g]), .carry_row(r[2*g+1])
        );
      end
      for (genvar k = 0; k < RP % 3; k++) begin : g_pass
        assign r[2*G+k] = g_lvl[l-1].r[3*G+k];
      end
    end
  end

  localparam int unsigned RF = rows_at_level_3_2(K, LEVELS);

  assign sum_row = g_lvl[LEVELS].r[0];
  if (RF > 1) begin : g_two
    assign carry_row = g_lvl[LEVELS].r[1];
  end else begin : g_one
    assign carry_row = '0;
  end

endmodule
