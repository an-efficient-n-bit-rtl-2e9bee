// vedic_mul2: 2-bit by 2-bit unsigned multiplier in the Urdhva Tiryakbhyam
// ("vertically and crosswise") form, the leaf of the recursive N-bit multiplier.
// The three steps of the method map onto three columns of the product:
//   vertical   (right): p[0] = a[0]&b[0]
//   crosswise  (middle): a[1]&b[0] + a[0]&b[1]  -> half adder: sum is p[1], carry c1
//   vertical   (left): a[1]&b[1] + c1          -> half adder: sum is p[2], carry is p[3]
// Interface: p = a * b. Timing: purely combinational, no clock or reset.
// The vertical/crosswise steps follow the method; realising each column sum with a
// half adder is this design's choice (the column sums never exceed two bits).
module vedic_mul2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] p
);
  logic c1;  // carry out of the crosswise step

  assign p[0] = a[0] & b[0];

  half_adder u_cross (
    .x (a[1] & b[0]),
    .y (a[0] & b[1]),
    .s (p[1]),
    .co(c1)
  );

  half_adder u_upper (
    .x (a[1] & b[1]),
    .y (c1),
    .s (p[2]),
    .co(p[3])
  );
endmodule
