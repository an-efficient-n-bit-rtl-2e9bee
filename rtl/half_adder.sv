// half_adder: one-bit half adder, the basic cell of the 2x2 vertical-and-crosswise
// multiplier and of the carry merge in the N-bit multiplier.
//   s  = x ^ y   (sum bit)
//   co = x & y   (carry bit)
// Purely combinational, no clock or reset. The method only calls for the column sums
// of the vertical-and-crosswise steps; using a half adder for them is this design's
// choice.
module half_adder (
  input  logic x,
  input  logic y,
  output logic s,
  output logic co
);
  assign s  = x ^ y;
  assign co = x & y;
endmodule
