// cla_adder: carry look-ahead adder, the final adder of the multiplier.
//
// Every bit position forms a generate signal g = a & b (a carry is made
// here) and a propagate signal p = a ^ b (an incoming carry passes on);
// where both are 0 the carry is killed. The carry into each position is
// then computed directly from these signals, without a ripple through the
// lower bits: group generate/propagate pairs over spans of 1, 2, 4, ...
// bits are combined in ceil(log2(WIDTH)) levels (a Kogge-Stone
// parallel-prefix network), so every carry is ready after the same
// logarithmic delay. The use of propagate and generate follows the source;
// the prefix network that looks the carries ahead across a wide word is
// this design's choice.
//
// Interface: a + b + cin = {cout, sum}. Timing: purely combinational.
module cla_adder #(
  parameter int unsigned WIDTH = 252
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  localparam int unsigned LEVELS = (WIDTH > 1) ? $clog2(WIDTH) : 1;

  logic [WIDTH-1:0] p;      // per-bit propagate
  logic [WIDTH-1:0] carry;  // carry into each bit

  assign p = a ^ b;

  // Level 0: per-bit generate, with cin folded into bit 0.
  for (genvar l = 0; l <= LEVELS; l++) begin : g_lvl
    logic [WIDTH-1:0] gg;  // group generate of the span ending at bit i
    logic [WIDTH-1:0] gp;  // group propagate of the same span
    if (l == 0) begin : g_init
      always_comb begin
        gg = a & b;
        gg[0] = (a[0] & b[0]) | (p[0] & cin);
        gp = p;
      end
    end else begin : g_comb
      localparam int unsigned D = 1 << (l - 1);
      for (genvar i = 0; i < WIDTH; i++) begin : g_bit
        if (i >= D) begin : g_join
          assign gg[i] = g_lvl[l-1].gg[i] | (g_lvl[l-1].gp[i] & g_lvl[l-1].gg[i-D]);
          assign gp[i] = g_lvl[l-1].gp[i] & g_lvl[l-1].gp[i-D];
        end else begin : g_pass
          assign gg[i] = g_lvl[l-1].gg[i];
          assign gp[i] = g_lvl[l-1].gp[i];
        end
      end
    end
  end

  // gg[i] at the last level is the carry out of bit i.
  if (WIDTH > 1) begin : g_carry
    assign carry = {g_lvl[LEVELS].gg[WIDTH-2:0], cin};
  end else begin : g_carry1
    assign carry = cin;
  end

  assign sum  = p ^ carry;
  assign cout = g_lvl[LEVELS].gg[WIDTH-1];

endmodule
