// fir_filter: direct-form FIR filter built on the radix-8 Booth multiplier.
//
// y[n] = sum over k of COEFFS[k] * x[n-k], k = 0..TAPS-1. A shift register
// holds the last TAPS-1 input samples. Each tap has its own
// booth_multiplier: the sample is the Booth-recoded multiplier operand and
// the coefficient the multiplicand. The TAPS products are summed and the
// sum is registered into y.
//
// The filter serves as an application of the multipliers; the sample width
// (8 bits) and output width (19 bits) follow the source, while the number
// of taps, the coefficient width and values, the direct form and the reset
// behaviour are this design's choices. The default coefficients are a
// symmetric low-pass set; with 8-bit samples and coefficients the output
// cannot overflow 19 bits.
//
// Interface: clk, rst (synchronous, active high: clears the delay line and
// y), x (two's complement sample, sampled on every rising edge), y (two's
// complement result). Timing: one cycle of latency; the edge that samples
// x[n] also loads y[n], which already includes COEFFS[0]*x[n].
module fir_filter
  import booth_pkg::*;
#(
  parameter int unsigned XW    = 8,         // sample width
  parameter int unsigned YW    = 19,        // output width
  parameter int unsigned CW    = 8,         // coefficient width
  parameter int unsigned TAPS  = 8,         // filter length, at least 2
  parameter tree_e       TREE  = TREE_4_2,  // multiplier variant
  parameter logic signed [CW-1:0] COEFFS [TAPS] = '{-4, 6, 27, 47, 47, 27, 6, -4}
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic signed [XW-1:0] x,
  output logic signed [YW-1:0] y
);

  localparam int unsigned PW = XW + CW;

  logic signed [XW-1:0] taps [TAPS];    // taps[0] = x[n], taps[k] = x[n-k]
  logic signed [XW-1:0] hist [TAPS-1];  // registered samples, hist[k] = x[n-1-k]
  logic signed [PW-1:0] prod [TAPS];
  logic signed [YW-1:0] acc;

  always_comb begin
    taps[0] = x;
    for (int k = 1; k < TAPS; k++) taps[k] = hist[k-1];
  end

  for (genvar k = 0; k < TAPS; k++) begin : g_tap
    booth_multiplier #(.M(CW), .N(XW), .TREE(TREE)) u_mul (
      .multiplicand(COEFFS[k]),
      .multiplier  (taps[k]),
      .product     (prod[k])
    );
  end

  always_comb begin
    acc = '0;
    for (int k = 0; k < TAPS; k++) acc = acc + YW'(prod[k]);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < TAPS - 1; k++) hist[k] <= '0;
      y <= '0;
    end else begin
      for (int k = 0; k < TAPS - 1; k++) hist[k] <= taps[k];
      y <= acc;
    end
  end

endmodule
