// tb_vedic_8x8: exhaustive check of the 8x8 Vedic multiplier: every pair
// of 8-bit operands, product compared with integer multiplication.
module tb_vedic_8x8;
  localparam int N = 8;
  logic [N-1:0]   a, b;
  logic [2*N-1:0] q;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  vedic_8x8 dut (.a(a), .b(b), .q(q));

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2 ** (2 * N); i++) begin
      {a, b} = (2 * N)'(i);
      #1;
      checks++;
      if (q != (2 * N)'(a) * (2 * N)'(b)) begin
        failures++;
        if (failures < 10) $display("FAIL %0d * %0d -> %0d", a, b, q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
