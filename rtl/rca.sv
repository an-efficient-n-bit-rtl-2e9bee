// rca: W-bit ripple carry adder.
// A chain of W full adders; the carry out of bit i is the carry in of bit i+1, so the
// delay grows linearly with W. The N-bit Vedic multiplier uses three of these, each
// N bits wide, to add its four partial products.
// Interface: s = (x + y + cin) mod 2**W, cout = carry out of the top bit.
// Timing: purely combinational, no clock or reset.
// The ripple structure is the one the multiplier is specified with; carry in and
// carry out ports are this design's choice so the adder can be chained.
module rca #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);
  logic [W:0] c;  // c[i] is the carry into bit i

  assign c[0] = cin;

  for (genvar i = 0; i < W; i++) begin : g_bit
    full_adder u_fa (
      .x (x[i]),
      .y (y[i]),
      .ci(c[i]),
      .s (s[i]),
      .co(c[i+1])
    );
  end

  assign cout = c[W];
endmodule
