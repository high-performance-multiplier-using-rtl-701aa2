// compressor_3_2: the 3:2 compressor, a carry-save adder cell.
//
// Three bits of the same weight are reduced to a sum bit of that weight and
// a carry bit of twice the weight, a + b + c = sum + 2*carry. All outputs
// are formed in parallel, so a row of these cells has the delay of one
// full adder whatever its width. The xor / majority form is the usual full
// adder. Timing: purely combinational.
module compressor_3_2 (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic sum,
  output logic carry
);

  assign sum   = a ^ b ^ c;
  assign carry = (a & b) | (a & c) | (b & c);

endmodule
