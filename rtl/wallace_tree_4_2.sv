// wallace_tree_4_2: Wallace tree of 4:2 compressors.
//
// K rows of W bits are reduced to two rows whose sum equals the sum of all
// K rows modulo 2^W. At each level the rows are taken in groups of four and
// each group passes through a row of 4:2 compressors (compressor_4_2_row),
// which turns it into a sum row and a carry row. One or two rows left over
// go to the next level unchanged; three left over go through a row of 3:2
// compressors. The regular 4-into-2 structure halves the row count per
// level: 43 rows need 5 levels (43, 22, 12, 6, 4, 2) where the 3:2 tree
// needs 9. The grouping by fours in order and the handling of three
// leftover rows are this design's choices.
//
// Interface: rows in; sum_row and carry_row out, to be added by the final
// carry look-ahead adder. Timing: purely combinational.
module wallace_tree_4_2
  import booth_pkg::*;
#(
  parameter int unsigned K = 43,   // rows to add
  parameter int unsigned W = 252   // row width
) (
  input  logic [W-1:0] rows [K],
  output logic [W-1:0] sum_row,
  output logic [W-1:0] carry_row
);

  localparam int unsigned LEVELS = levels_4_2(K);

  for (genvar l = 0; l <= LEVELS; l++) begin : g_lvl
    localparam int unsigned R = rows_at_level_4_2(K, l);
    logic [W-1:0] r [R];

    if (l == 0) begin : g_in
      assign r = rows;
    end else begin : g_red
      localparam int unsigned RP = rows_at_level_4_2(K, l - 1);
      localparam int unsigned G  = RP / 4;
      localparam int unsigned LO = RP % 4;
      for (genvar g = 0; g < G; g++) begin : g_grp
        compressor_4_2_row #(.W(W)) u_c42 (
          .a(g_lvl[l-1].r[4*g]),   .b(g_lvl[l-1].r[4*g+1]),
          .c(g_lvl[l-1].r[4*g+2]), .d(g_lvl[l-1].r[4*g+3]),
          .sum_row(r[2*g]), .carry_row(r[2*g+1])
        );
      end
      if (LO == 3) begin : g_left3
        csa_row #(.W(W)) u_csa (
          .a(g_lvl[l-1].r[4*G]), .b(g_lvl[l-1].r[4*G+1]), .c(g_lvl[l-1].r[4*G+2]),
          .sum_row(r[2*G]), .carry_row(r[2*G+1])
        );
      end else begin : g_pass
        for (genvar k = 0; k < LO; k++) begin : g_row
          assign r[2*G+k] = g_lvl[l-1].r[4*G+k];
        end
      end
    end
  end

  localparam int unsigned RF = rows_at_level_4_2(K, LEVELS);

  assign sum_row = g_lvl[LEVELS].r[0];
  if (RF > 1) begin : g_two
    assign carry_row = g_lvl[LEVELS].r[1];
  end else begin : g_one
    assign carry_row = '0;
  end

endmodule
