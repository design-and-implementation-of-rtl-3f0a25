// tb_rca: ripple carry adder at its default width (8 bits), checked for
// every pair of operands and both carry inputs against integer addition,
// and a 37-bit instance checked on random operands.
module tb_rca;
  localparam int W = 8;
  localparam int WL = 37;
  logic [W-1:0]  a, b, s;
  logic          cin, cout;
  logic [WL-1:0] la, lb, ls;
  logic          lcin, lcout;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  rca dut (.a(a), .b(b), .cin(cin), .sum(s), .cout(cout));
  rca #(.W(WL)) dut_l (.a(la), .b(lb), .cin(lcin), .sum(ls), .cout(lcout));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2 ** (2 * W + 1); i++) begin
      {cin, a, b} = (2 * W + 1)'(i);
      #1;
      checks++;
      if ({cout, s} != (W + 1)'(a) + (W + 1)'(b) + (W + 1)'(cin)) begin
        failures++;
        if (failures < 10) $display("FAIL %0d + %0d + %0d -> %0d", a, b, cin, {cout, s});
      end
    end
    for (int i = 0; i < 5000; i++) begin
      la = WL'({$urandom, $urandom});
      lb = WL'({$urandom, $urandom});
      if (i == 0) begin la = '1; lb = '0; end
      lcin = 1'($urandom);
      if (i == 0) lcin = 1'b1;
      #1;
      checks++;
      if ({lcout, ls} != (WL + 1)'(la) + (WL + 1)'(lb) + (WL + 1)'(lcin)) begin
        failures++;
        if (failures < 10) $display("FAIL wide %0h + %0h + %0d -> %0h", la, lb, lcin, {lcout, ls});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
