// tb_addsub: adder/subtractor at its default width (256 bits). Random and
// corner-case operands in both modes; {cout, y} is compared with a + b in
// add mode and with a - b (cout = no borrow) in subtract mode.
module tb_addsub;
  localparam int W = 256;
  logic [W-1:0] a, b, y;
  logic         sub, cout;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  addsub dut (.a(a), .b(b), .sub(sub), .y(y), .cout(cout));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] rnd();
    logic [W-1:0] r;
    for (int k = 0; k < W / 32; k++) r[k*32 +: 32] = $urandom;
    return r;
  endfunction

  task automatic check(input logic [W-1:0] x, input logic [W-1:0] z, input logic s);
    logic [W:0] exp_v;
    a = x; b = z; sub = s;
    #1;
    if (s) exp_v = {(x >= z), W'(x - z)};
    else   exp_v = (W + 1)'(x) + (W + 1)'(z);
    checks++;
    if ({cout, y} != exp_v) begin
      failures++;
      if (failures < 10) $display("FAIL sub=%0b %h %h -> %h", s, x, z, {cout, y});
    end
  endtask

  initial begin
    check('1, 1, 1'b0);
    check('1, '1, 1'b0);
    check('0, 1, 1'b1);
    check(5, 5, 1'b1);
    check('1, '0, 1'b1);
    for (int i = 0; i < 4000; i++) check(rnd(), rnd(), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
