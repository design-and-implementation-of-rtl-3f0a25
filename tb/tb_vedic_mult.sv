// tb_vedic_mult: the recursive Vedic multiplier at every operand width from
// 2x2 to 64x64 (N = 2, 4, 8, 16, 32, 64); the largest has three split levels
// above the 8x8 block (64 -> 32 -> 16 -> 8). All instances get the low N
// bits of the same operands; products are compared with integer
// multiplication on corner cases, the decimal worked examples 325 x 738 and
// 92 x 94, and random operands.
module tb_vedic_mult;
  localparam int N = 64;
  localparam int NSIZES = 6;   // N = 2, 4, 8, 16, 32, 64
  logic [N-1:0]   a, b;
  logic [2*N-1:0] c [NSIZES];
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  for (genvar s = 0; s < NSIZES; s++) begin : g_size
    localparam int W = 2 << s;
    logic [2*W-1:0] q;
    vedic_mult #(.N(W)) dut (.a(a[W-1:0]), .b(b[W-1:0]), .c(q));
    assign c[s] = (2*N)'(q);
  end

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [N-1:0] x, input logic [N-1:0] y);
    logic [N-1:0]   xm, ym;
    logic [2*N-1:0] want;
    a = x; b = y;
    #1;
    for (int s = 0; s < NSIZES; s++) begin
      xm = x & ((N'(1) << (2 << s)) - 1'b1);
      ym = y & ((N'(1) << (2 << s)) - 1'b1);
      if (s == NSIZES - 1) begin xm = x; ym = y; end
      want = (2*N)'(xm) * (2*N)'(ym);
      checks++;
      if (c[s] != want) begin
        failures++;
        if (failures < 10) $display("FAIL N=%0d %h * %h -> %h, want %h", 2 << s, xm, ym, c[s], want);
      end
    end
  endtask

  initial begin
    check(325, 738);   // 239850
    check(92, 94);     // 8648
    check('0, '0);
    check('1, '1);
    check('1, 1);
    check(1, '1);
    check({1'b1, {(N-1){1'b0}}}, {1'b1, {(N-1){1'b0}}});
    for (int i = 0; i < N; i++) check(N'(1) << i, '1);
    for (int i = 0; i < 20000; i++) check({$urandom, $urandom}, {$urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
