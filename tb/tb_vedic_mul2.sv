// tb_vedic_mul2: exhaustive self-checking test of the 2x2 vertical-and-crosswise
// multiplier. All 16 operand pairs are applied, one per clock cycle; the product
// must be valid in the same cycle (the block is combinational) and equal the
// integer product computed here. A watchdog ends the run if it hangs.
module tb_vedic_mul2;
  logic       clk = 1'b0;
  logic [1:0] a, b;
  logic [3:0] p;
  int         checks = 0;
  int         failures = 0;

  always #5 clk = ~clk;

  vedic_mul2 dut (.a(a), .b(b), .p(p));

  initial begin
    for (int i = 0; i < 4; i++) begin
      for (int j = 0; j < 4; j++) begin
        @(posedge clk);
        a = 2'(i);
        b = 2'(j);
        #1;
        checks++;
        if (p !== 4'(i * j)) begin
          failures++;
          $display("FAIL %0d * %0d: got %0d, expected %0d", i, j, p, i * j);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
