// tb_shifter: logarithmic shifter at its defaults (34 bits, 4-bit shift
// amount); every shift amount on random and all-ones data, compared with
// the << operator.
module tb_shifter;
  localparam int W = 34;
  localparam int SW = 4;
  logic [W-1:0]  d, y;
  logic [SW-1:0] sh;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  shifter dut (.d(d), .sh(sh), .y(y));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4000; i++) begin
      d  = (i < 16) ? '1 : W'({$urandom, $urandom});
      sh = SW'(i);
      #1;
      checks++;
      if (y != (d << sh)) begin
        failures++;
        if (failures < 10) $display("FAIL %h << %0d -> %h", d, sh, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
