// tb_vedic_mul: end-to-end self-checking test of the multiplier at its default size
// (8 x 8 bits, no parameter override).
// Every pair of operands (65536 cases) is applied, one per clock cycle, and the
// 16-bit product is compared with a * b computed here; the multiplier is purely
// combinational, so each product must be valid in the cycle its operands arrive.
// The two worked examples of the method (44 x 32 = 1408 in decimal, and
// 1011 x 1101 = 10001111 in binary) are also checked by name.
// For each case the testbench works out, from the operands alone, which carries the
// vertical-and-crosswise structure has to produce, and counts them per level:
//   - the crosswise carry of a 2x2 leaf (a1b0 and a0b1 both 1),
//   - the carry out of the crosswise adder (aH*bL + aL*bH >= 2**S) of a 4x4 stage
//     and of the 8x8 stage,
//   - the carry out of the middle adder of a 4x4 stage and of the 8x8 stage.
// A mechanism that never occurs counts as a failure. A watchdog ends the run if it
// hangs.
module tb_vedic_mul;
  localparam int unsigned N = 8;

  logic           clk = 1'b0;
  logic [N-1:0]   a, b;
  logic [2*N-1:0] p;
  int             checks = 0;
  int             failures = 0;

  // Mechanism counters.
  int leaf_cross = 0;
  int cross_carry[2] = '{0, 0};  // index 0: 4x4 stages, 1: 8x8 stage
  int mid_carry[2]   = '{0, 0};

  always #5 clk = ~clk;

  vedic_mul dut (.a(a), .b(b), .p(p));

  // Carries of one S-bit stage with operands x, y; recurse into the halves.
  function automatic void tally(int unsigned x, int unsigned y, int unsigned s);
    int unsigned h, xl, xh, yl, yh, xsum, mid;
    if (s == 2) begin
      if (((x >> 1) & y & 1) != 0 && (x & (y >> 1) & 1) != 0) leaf_cross++;
      return;
    end
    h  = s / 2;
    xl = x % (1 << h);  xh = x >> h;
    yl = y % (1 << h);  yh = y >> h;
    xsum = xh * yl + xl * yh;
    mid   = (xsum % (1 << s)) + ((xl * yl) >> h);
    if (xsum >= (1 << s)) cross_carry[s == N ? 1 : 0]++;
    if (mid   >= (1 << s)) mid_carry[s == N ? 1 : 0]++;
    tally(xl, yl, h);
    tally(xh, yl, h);
    tally(xl, yh, h);
    tally(xh, yh, h);
  endfunction

  task automatic apply(int unsigned x, int unsigned y);
    @(posedge clk);
    a = N'(x);
    b = N'(y);
    #1;
    checks++;
    if (p !== (2 * N)'(x * y)) begin
      failures++;
      if (failures < 10)
        $display("FAIL %0d * %0d: got %0d, expected %0d", x, y, p, x * y);
    end
  endtask

  initial begin
    // Worked examples.
    apply(44, 32);
    checks++;
    if (p !== 16'd1408) begin
      failures++;
      $display("FAIL 44 * 32 gave %0d", p);
    end
    apply('b1011, 'b1101);
    checks++;
    if (p !== 16'b1000_1111) begin
      failures++;
      $display("FAIL 1011 * 1101 gave %b", p);
    end

    // Exhaustive sweep.
    for (int unsigned i = 0; i < (1 << N); i++) begin
      for (int unsigned j = 0; j < (1 << N); j++) begin
        tally(i, j, N);
        apply(i, j);
      end
    end

    $display("2x2 crosswise carries: %0d", leaf_cross);
    $display("4x4 crosswise-adder carries: %0d, middle-adder carries: %0d",
             cross_carry[0], mid_carry[0]);
    $display("8x8 crosswise-adder carries: %0d, middle-adder carries: %0d",
             cross_carry[1], mid_carry[1]);
    checks++;
    if (leaf_cross == 0 || cross_carry[0] == 0 || mid_carry[0] == 0 ||
        cross_carry[1] == 0 || mid_carry[1] == 0) begin
      failures++;
      $display("FAIL a carry mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
