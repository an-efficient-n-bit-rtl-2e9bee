// vedic_mul: N-bit by N-bit unsigned multiplier built by repeated application of the
// Urdhva Tiryakbhyam ("vertically and crosswise") method. This is the top of the
// design.
//
// Splitting each operand into a high and a low half (H = N/2 bits) turns the
// multiplication into a two-digit one:
//   a * b = (aH*bH) << N  +  (aH*bL + aL*bH) << H  +  aL*bL
// The four half-size products are formed the same way, down to 2x2 multipliers.
// An 8x8 multiplier is therefore four 4x4 multipliers and three 8-bit ripple carry
// adders, and each 4x4 is four 2x2 multipliers and three 4-bit adders.
//
// The tree is written level by level rather than as a self-instantiating module.
// With L = log2(N), level 0 holds 4**(L-1) 2x2 multipliers (vedic_mul2), and level k
// holds 4**(L-1-k) adder stages (vedic_combine) of width S = 2**(k+1), each fed by
// four level k-1 products. Node j at level k takes the children 4j+0 .. 4j+3 as
// aL*bL, aH*bL, aL*bH, aH*bH. Read in base 4, a leaf index names the path from the
// root: digit t (least significant first) is the choice made at the split of
// size 2**(t+2); its bit 0 selects the high half of a and bit 1 the high half of b,
// which moves the operand slice by 2**(t+1) bits.
//
// Interface: a, b (N bits), p = a * b (2N bits), unsigned.
// Timing: purely combinational, no clock or reset; the critical path runs through
// one 2x2 multiplier and three ripple adders at each level.
// Parameter: N must be a power of two, at least 2 (elaboration error otherwise).
//
// The decomposition, the counts of sub-multipliers and adders per level and N = 8 as
// the main size follow the method as specified; the level-by-level form is this
// design's own.
module vedic_mul #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);
  localparam int unsigned L = $clog2(N);  // number of levels

  // Bit offset of leaf j's slice of a (sel = 0) or b (sel = 1).
  function automatic int unsigned leaf_offset(int unsigned j, int unsigned sel);
    int unsigned off = 0;
    for (int unsigned t = 0; t + 1 < L; t++) begin
      if (((j >> (2 * t + sel)) & 1) != 0) off += (1 << (t + 1));
    end
    return off;
  endfunction

  if (N < 2 || (N & (N - 1)) != 0) begin : g_bad_n
    $error("vedic_mul: N = %0d is not a power of two >= 2", N);
  end else begin : g_tree
    for (genvar k = 0; k < L; k++) begin : g_lvl
      localparam int unsigned S = 2 << k;                // operand width at this level
      localparam int unsigned C = 1 << (2 * (L - 1 - k)); // nodes at this level

      logic [2*S-1:0] prod [C];

      if (k == 0) begin : g_leaves
        for (genvar j = 0; j < C; j++) begin : g_node
          localparam int unsigned AO = leaf_offset(j, 0);
          localparam int unsigned BO = leaf_offset(j, 1);
          vedic_mul2 u_mul2 (
            .a(a[AO +: 2]),
            .b(b[BO +: 2]),
            .p(prod[j])
          );
        end
      end else begin : g_adders
        for (genvar j = 0; j < C; j++) begin : g_node
          vedic_combine #(.N(S)) u_comb (
            .pp_ll(g_lvl[k-1].prod[4*j+0]),
            .pp_hl(g_lvl[k-1].prod[4*j+1]),
            .pp_lh(g_lvl[k-1].prod[4*j+2]),
            .pp_hh(g_lvl[k-1].prod[4*j+3]),
            .p    (prod[j])
          );
        end
      end
    end

    assign p = g_lvl[L-1].prod[0];
  end
endmodule
