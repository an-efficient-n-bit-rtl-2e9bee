// tb_vedic_mul_sizes: self-checking test of the multiplier at other sizes than the
// default, to show the level-by-level construction holds for any power-of-two N:
//   N = 2  (a single 2x2 leaf)       exhaustive, 16 cases
//   N = 4  (four leaves, one stage)  exhaustive, 256 cases, including the binary
//                                    worked example 1011 x 1101 = 10001111
//   N = 16, 32, 64                   the all-ones and one-hot corner cases, then
//                                    random operands from $urandom
// Each product is compared with the product of the zero-extended operands computed
// here. The multipliers are combinational; each result is checked in the cycle its
// operands are applied. A watchdog ends the run if it hangs.
module tb_vedic_mul_sizes;
  localparam int RANDOM_CASES = 20000;

  logic         clk = 1'b0;
  int           checks = 0;
  int           failures = 0;

  logic [1:0]   a2, b2;   logic [3:0]   p2;
  logic [3:0]   a4, b4;   logic [7:0]   p4;
  logic [15:0]  a16, b16; logic [31:0]  p16;
  logic [31:0]  a32, b32; logic [63:0]  p32;
  logic [63:0]  a64, b64; logic [127:0] p64;

  always #5 clk = ~clk;

  vedic_mul #(.N(2))  dut2  (.a(a2),  .b(b2),  .p(p2));
  vedic_mul #(.N(4))  dut4  (.a(a4),  .b(b4),  .p(p4));
  vedic_mul #(.N(16)) dut16 (.a(a16), .b(b16), .p(p16));
  vedic_mul #(.N(32)) dut32 (.a(a32), .b(b32), .p(p32));
  vedic_mul #(.N(64)) dut64 (.a(a64), .b(b64), .p(p64));

  function automatic logic [63:0] rand64();
    return {$urandom(), $urandom()};
  endfunction

  task automatic check(logic [127:0] got, logic [127:0] want, string what);
    checks++;
    if (got !== want) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h, expected %h", what, got, want);
    end
  endtask

  task automatic apply_wide(logic [63:0] x, logic [63:0] y);
    @(posedge clk);
    a16 = x[15:0];  b16 = y[15:0];
    a32 = x[31:0];  b32 = y[31:0];
    a64 = x;        b64 = y;
    #1;
    check(128'(p16), 128'(x[15:0]) * 128'(y[15:0]), "N=16");
    check(128'(p32), 128'(x[31:0]) * 128'(y[31:0]), "N=32");
    check(p64, 128'(x) * 128'(y), "N=64");
  endtask

  initial begin
    a16 = '0; b16 = '0; a32 = '0; b32 = '0; a64 = '0; b64 = '0;

    for (int i = 0; i < 4; i++) begin
      for (int j = 0; j < 4; j++) begin
        @(posedge clk);
        a2 = 2'(i);
        b2 = 2'(j);
        #1;
        check(128'(p2), 128'(i * j), "N=2");
      end
    end

    for (int i = 0; i < 16; i++) begin
      for (int j = 0; j < 16; j++) begin
        @(posedge clk);
        a4 = 4'(i);
        b4 = 4'(j);
        #1;
        check(128'(p4), 128'(i * j), "N=4");
      end
    end
    @(posedge clk);
    a4 = 4'b1011;
    b4 = 4'b1101;
    #1;
    check(128'(p4), 128'(8'b1000_1111), "N=4 worked example");

    apply_wide('1, '1);
    apply_wide('1, 64'd1);
    for (int k = 0; k < 64; k++) apply_wide(64'd1 << k, '1);
    for (int k = 0; k < RANDOM_CASES; k++) apply_wide(rand64(), rand64());

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
