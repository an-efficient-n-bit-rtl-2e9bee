// full_adder: one-bit full adder (three inputs, two outputs), the cell that the
// ripple carry adder chains.
//   s  = x ^ y ^ ci
//   co = majority(x, y, ci)
// Purely combinational, no clock or reset. The ripple carry adders are named by the
// method; this standard cell (XOR sum, majority carry) is this design's choice.
module full_adder (
  input  logic x,
  input  logic y,
  input  logic ci,
  output logic s,
  output logic co
);
  assign s  = x ^ y ^ ci;
  assign co = (x & y) | (ci & (x ^ y));
endmodule
