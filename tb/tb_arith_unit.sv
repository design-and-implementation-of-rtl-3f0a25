// tb_arith_unit: arithmetic unit at N = 16. Random operands each cycle;
// product, sum, difference and borrow are checked combinationally, and the
// MAC accumulator against a reference model after every clock edge, with
// random enable and occasional clear.
module tb_arith_unit;
  localparam int N = 16;
  logic           clk = 1'b0;
  logic           rst_n, acc_clr, acc_en;
  logic [N-1:0]   a, b, difference;
  logic [2*N-1:0] product, acc, model;
  logic [N:0]     sum;
  logic           borrow;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  arith_unit #(.N(N)) dut (
    .clk(clk), .rst_n(rst_n), .a(a), .b(b), .acc_clr(acc_clr), .acc_en(acc_en),
    .product(product), .sum(sum), .difference(difference), .borrow(borrow), .acc(acc)
  );

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input logic [2*N:0] got, input logic [2*N:0] want, input string what);
    checks++;
    if (got !== want) begin
      failures++;
      if (failures < 10) $display("FAIL %s a=%h b=%h got=%h want=%h", what, a, b, got, want);
    end
  endtask

  initial begin
    rst_n = 1'b0; acc_clr = 1'b0; acc_en = 1'b0; a = '0; b = '0; model = '0;
    #12 rst_n = 1'b1;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      a = N'($urandom); b = N'($urandom);
      if (i == 0) begin a = '1; b = '1; end
      acc_en  = 1'($urandom);
      acc_clr = ($urandom % 64) == 0;
      #1;
      expect_eq((2*N+1)'(product), (2*N+1)'((2*N)'(a) * (2*N)'(b)), "product");
      expect_eq((2*N+1)'(sum), (2*N+1)'((N+1)'(a) + (N+1)'(b)), "sum");
      expect_eq((2*N+1)'({borrow, difference}), (2*N+1)'({a < b, N'(a - b)}), "difference");
      @(posedge clk); #1;
      if (acc_clr) model = '0;
      else if (acc_en) model = model + (2*N)'(a) * (2*N)'(b);
      expect_eq((2*N+1)'(acc), (2*N+1)'(model), "acc");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
