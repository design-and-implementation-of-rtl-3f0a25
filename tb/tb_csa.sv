// tb_csa: carry save adder at its default width (8 bits). For random and
// corner-case operands it checks the bitwise sum and majority words and the
// invariant x + y + z = s + 2c.
module tb_csa;
  localparam int W = 8;
  logic [W-1:0] x, y, z, s, c;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  csa dut (.x(x), .y(y), .z(z), .s(s), .c(c));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 20000; i++) begin
      {x, y, z} = (3 * W)'($urandom);
      if (i == 0) {x, y, z} = '1;
      if (i == 1) {x, y, z} = '0;
      #1;
      checks++;
      if (s != (x ^ y ^ z) || c != ((x & y) | (y & z) | (x & z))) begin
        failures++;
        if (failures < 10) $display("FAIL bitwise x=%h y=%h z=%h s=%h c=%h", x, y, z, s, c);
      end
      checks++;
      if ((W + 2)'(x) + (W + 2)'(y) + (W + 2)'(z) != (W + 2)'(s) + ((W + 2)'(c) << 1)) begin
        failures++;
        if (failures < 10) $display("FAIL sum x=%h y=%h z=%h s=%h c=%h", x, y, z, s, c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
