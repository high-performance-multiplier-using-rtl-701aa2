// booth_pp_gen: radix-8 Booth partial product generator.
//
// The N-bit two's-complement multiplier is sign-extended to 3*ND bits
// (ND = ceil(N/3)) and cut into ND overlapping quartets {y[3i+2], y[3i+1],
// y[3i], y[3i-1]} with y[-1] = 0. A booth_encoder turns each quartet into a
// digit d_i in {0, +-1, +-2, +-3, +-4}, and the row d_i * X * 8^i is formed
// from the multiplicand X. The multiples X, 2X and 4X are shifts; the hard
// multiple 3X = X + 2X is formed once by a carry look-ahead adder and
// shared by all rows. A negative digit inverts its row; the +1 that
// completes the two's complement is collected, at bit 3i, in one extra
// correction row (the last row). Each row is sign-extended to the full
// product width P = M+N, so the sum of all ND+1 rows modulo 2^P is the
// signed product X*Y.
//
// The recoding follows the standard radix-8 table. How the rows are formed
// (full-width sign extension, a separate correction row, a shared 3X
// adder) is this design's choice.
//
// Interface: rows[0..ND-1] partial products, rows[ND] corrections.
// Timing: purely combinational.
module booth_pp_gen
  import booth_pkg::*;
#(
  parameter int unsigned M = 126,  // multiplicand width
  parameter int unsigned N = 126   // multiplier width
) (
  input  logic [M-1:0]   multiplicand,
  input  logic [N-1:0]   multiplier,
  output logic [M+N-1:0] rows [num_digits(N)+1]
);

  localparam int unsigned P  = M + N;
  localparam int unsigned ND = num_digits(N);
  localparam int unsigned YW = 3 * ND;

  // Multiplier, sign-extended, with the implicit y[-1] = 0 below bit 0.
  logic [YW:0] y_ext;
  assign y_ext = {{(YW - N){multiplier[N-1]}}, multiplier, 1'b0};

  // Multiples of X, sign-extended to the product width.
  logic [P-1:0] x1, x2, x3, x4;
  assign x1 = P'(signed'(multiplicand));
  assign x2 = x1 << 1;
  assign x4 = x1 << 2;

  cla_adder #(.WIDTH(P)) u_x3 (
    .a(x1), .b(x2), .cin(1'b0), .sum(x3), .cout()
  );

  booth_digit_t digit [ND];
  logic [P-1:0] corr;

  for (genvar i = 0; i < ND; i++) begin : g_row
    logic [P-1:0] mult;

    booth_encoder u_enc (
      .quartet(y_ext[3*i +: 4]),
      .digit  (digit[i])
    );

    always_comb begin
      unique case (digit[i].mag)
        3'd1:    mult = x1;
        3'd2:    mult = x2;
        3'd3:    mult = x3;
        3'd4:    mult = x4;
        default: mult = '0;
      endcase
    end

    assign rows[i] = (digit[i].neg ? ~mult : mult) << (3 * i);
  end

  always_comb begin
    corr = '0;
    for (int i = 0; i < ND; i++) corr[3*i] = digit[i].neg;
  end

  assign rows[ND] = corr;

endmodule
