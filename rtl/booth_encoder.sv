// booth_encoder: radix-8 Booth recoding of one quartet of multiplier bits.
//
// The multiplier is read in blocks of four bits, {y[i+2], y[i+1], y[i],
// y[i-1]}, each block overlapping the previous one by one bit. The quartet
// stands for the signed digit -4*y[i+2] + 2*y[i+1] + y[i] + y[i-1], which
// is one of 0, +-1, +-2, +-3, +-4 and multiplies the multiplicand with the
// weight 8^(i/3). This module gives that digit as a sign flag and a
// magnitude (booth_pkg::booth_digit_t). The recoding follows the standard
// radix-8 table; the sign/magnitude form of the output is this design's.
//
// Interface: quartet[3:0] = {y[i+2], y[i+1], y[i], y[i-1]} in, digit out.
// Timing: purely combinational.
module booth_encoder
  import booth_pkg::*;
(
  input  logic [3:0]   quartet,
  output booth_digit_t digit
);

  always_comb begin
    unique case (quartet)
      4'b0000, 4'b1111: digit = '{neg: 1'b0, mag: 3'd0};
      4'b0001, 4'b0010: digit = '{neg: 1'b0, mag: 3'd1};
      4'b0011, 4'b0100: digit = '{neg: 1'b0, mag: 3'd2};
      4'b0101, 4'b0110: digit = '{neg: 1'b0, mag: 3'd3};
      4'b0111:          digit = '{neg: 1'b0, mag: 3'd4};
      4'b1000:          digit = '{neg: 1'b1, mag: 3'd4};
      4'b1001, 4'b1010: digit = '{neg: 1'b1, mag: 3'd3};
      4'b1011, 4'b1100: digit = '{neg: 1'b1, mag: 3'd2};
      default:          digit = '{neg: 1'b1, mag: 3'd1};  // 1101, 1110
    endcase
  end

endmodule
