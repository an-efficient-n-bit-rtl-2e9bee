// tb_vedic_combine: self-checking test of one adder stage of the multiplier at its
// default width (N = 8). For every pair of 8-bit operands a and b (65536 cases) the
// testbench forms the four 4-bit half products aL*bL, aH*bL, aL*bH, aH*bH itself,
// feeds them to the stage and compares its 16-bit output with a * b. It also counts
// how often the crosswise sum and the middle-column sum carry out, so that both
// carry paths of the stage are shown to be exercised. Combinational: each result is
// checked in the cycle its inputs are applied. A watchdog ends the run if it hangs.
module tb_vedic_combine;
  localparam int unsigned N = 8;
  localparam int unsigned H = N / 2;

  logic           clk = 1'b0;
  logic [N-1:0]   pp_ll, pp_hl, pp_lh, pp_hh;
  logic [2*N-1:0] p;
  int             checks = 0;
  int             failures = 0;
  int             cross_carries = 0;
  int             mid_carries = 0;

  always #5 clk = ~clk;

  vedic_combine dut (
    .pp_ll(pp_ll), .pp_hl(pp_hl), .pp_lh(pp_lh), .pp_hh(pp_hh), .p(p)
  );

  initial begin
    int unsigned al, ah, bl, bh, xsum, mid;
    for (int unsigned i = 0; i < (1 << N); i++) begin
      for (int unsigned j = 0; j < (1 << N); j++) begin
        @(posedge clk);
        al = i % (1 << H);  ah = i >> H;
        bl = j % (1 << H);  bh = j >> H;
        pp_ll = N'(al * bl);
        pp_hl = N'(ah * bl);
        pp_lh = N'(al * bh);
        pp_hh = N'(ah * bh);
        xsum = ah * bl + al * bh;
        mid   = (xsum % (1 << N)) + ((al * bl) >> H);
        if (xsum >= (1 << N)) cross_carries++;
        if (mid   >= (1 << N)) mid_carries++;
        #1;
        checks++;
        if (p !== (2 * N)'(i * j)) begin
          failures++;
          if (failures < 10)
            $display("FAIL %0d * %0d: got %0d, expected %0d", i, j, p, i * j);
        end
      end
    end
    $display("crosswise carries: %0d, middle carries: %0d", cross_carries, mid_carries);
    checks++;
    if (cross_carries == 0 || mid_carries == 0) begin
      failures++;
      $display("FAIL a carry path was never exercised");
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
