// vedic_combine: the adder stage of one level of the Urdhva Tiryakbhyam multiplier.
// It takes the four half-size products of an N-bit multiplication, where the
// operands are split into high and low halves of H = N/2 bits,
//   pp_ll = aL*bL, pp_hl = aH*bL, pp_lh = aL*bH, pp_hh = aH*bH   (N bits each),
// and forms the 2N-bit product
//   p = (pp_hh << N) + ((pp_hl + pp_lh) << H) + pp_ll
// with three N-bit ripple carry adders:
//   adder 1 (crosswise): s1 = pp_hl + pp_lh                     carry c1
//   adder 2 (middle)   : s2 = s1 + (pp_ll >> H)                 carry c2
//   adder 3 (upper)    : s3 = pp_hh + ((c1 + c2) << H | s2 >> H)
//   result             : p  = {s3, s2[H-1:0], pp_ll[H-1:0]}
// The low H bits of pp_ll pass straight through: nothing else lands in that column.
// The carries c1 and c2 both weigh 2**N. Their sum never exceeds 1 (the middle
// column sum is below 2**(N+1)), but they are merged with a half adder so that the
// upper adder's operand is exact without relying on that bound. Because the product
// of two N-bit numbers fits in 2N bits, the carry out of adder 3 is always 0. Assertions check both bounds in
// simulation; they hold only when the inputs really are such products.
// Timing: purely combinational, no clock or reset. N must be even and at least 4.
//
// Three N-bit ripple carry adders per level follow the method as specified; the
// order in which they combine the products and the carry merge are this design's
// own choice.
module vedic_combine #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]   pp_ll,
  input  logic [N-1:0]   pp_hl,
  input  logic [N-1:0]   pp_lh,
  input  logic [N-1:0]   pp_hh,
  output logic [2*N-1:0] p
);
  localparam int unsigned H = N / 2;

  if (N < 4 || N % 2 != 0) begin : g_bad_n
    $error("vedic_combine: N = %0d must be even and at least 4", N);
  end

  logic [N-1:0] s1, s2, s3;
  logic         c1, c2, c3;
  logic         k0, k1;       // c1 + c2 as a two-bit number
  logic [N-1:0] ll_hi;        // pp_ll >> H
  logic [N-1:0] upper_add;    // second operand of adder 3

  // Adder 1: sum of the crosswise products.
  rca #(.W(N)) u_add_cross (
    .x(pp_hl), .y(pp_lh), .cin(1'b0), .s(s1), .cout(c1)
  );

  // Adder 2: bring in the part of the low product that overlaps the middle column.
  always_comb begin
    ll_hi        = '0;
    ll_hi[H-1:0] = pp_ll[N-1:H];
  end

  rca #(.W(N)) u_add_mid (
    .x(s1), .y(ll_hi), .cin(1'b0), .s(s2), .cout(c2)
  );

  // Merge the two middle carries, both of weight 2**N.
  half_adder u_carry_merge (.x(c1), .y(c2), .s(k0), .co(k1));

  // Adder 3: high product plus everything above bit N-1 of the middle column.
  always_comb begin
    upper_add        = '0;
    upper_add[H-1:0] = s2[N-1:H];
    upper_add[H]     = k0;
    upper_add[H+1]   = k1;
  end

  rca #(.W(N)) u_add_upper (
    .x(pp_hh), .y(upper_add), .cin(1'b0), .s(s3), .cout(c3)
  );

  assign p = {s3, s2[H-1:0], pp_ll[H-1:0]};

  // Bounds that hold whenever the inputs are the four products of two N-bit
  // numbers: the middle column carries at most once, and an N x N product fits in
  // 2N bits, so adder 3 never carries out.
  always_comb begin
    assert final (!(c1 && c2))
      else $error("vedic_combine: both middle-column adders carried out");
    assert final (c3 == 1'b0)
      else $error("vedic_combine: upper adder carried out");
  end
endmodule
