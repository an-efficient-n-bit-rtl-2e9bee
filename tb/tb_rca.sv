// tb_rca: exhaustive self-checking test of the ripple carry adder at its default
// width (8 bits): every x, y and carry in (131072 cases), one per clock cycle.
// Sum and carry out are compared with x + y + cin computed as a 9-bit integer.
// The adder is combinational, so each result must be valid in the cycle its
// operands are applied. A watchdog ends the run if it hangs.
module tb_rca;
  localparam int unsigned W = 8;

  logic         clk = 1'b0;
  logic [W-1:0] x, y, s;
  logic         cin, cout;
  int           checks = 0;
  int           failures = 0;
  logic [W:0]   expected;

  always #5 clk = ~clk;

  rca dut (.x(x), .y(y), .cin(cin), .s(s), .cout(cout));

  initial begin
    for (int i = 0; i < (1 << W); i++) begin
      for (int j = 0; j < (1 << W); j++) begin
        for (int c = 0; c < 2; c++) begin
          @(posedge clk);
          x   = W'(i);
          y   = W'(j);
          cin = 1'(c);
          #1;
          expected = (W + 1)'(i + j + c);
          checks++;
          if ({cout, s} !== expected) begin
            failures++;
            if (failures < 10)
              $display("FAIL %0d + %0d + %0d: got %0d, expected %0d",
                       i, j, c, {cout, s}, expected);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
