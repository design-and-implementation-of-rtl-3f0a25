// tb_mac: accumulator at its default width (512 bits). Drives random
// products with random enable and clear and compares acc after every clock
// edge with a reference model; checks the one-cycle latency, hold with
// en = 0, clear, asynchronous reset and wrap-around past 2^512.
module tb_mac;
  localparam int P = 512;
  logic         clk = 1'b0;
  logic         rst_n, clr, en;
  logic [P-1:0] product, acc, model;
  int checks = 0, failures = 0;
  int n_wrap = 0;
  always #5 clk = ~clk;

  mac dut (.clk(clk), .rst_n(rst_n), .clr(clr), .en(en), .product(product), .acc(acc));

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [P-1:0] rnd();
    logic [P-1:0] r;
    for (int k = 0; k < P / 32; k++) r[k*32 +: 32] = $urandom;
    return r;
  endfunction

  task automatic compare(input string what);
    checks++;
    if (acc !== model) begin
      failures++;
      if (failures < 10) $display("FAIL %s acc=%h model=%h", what, acc, model);
    end
  endtask

  initial begin
    rst_n = 1'b0; clr = 1'b0; en = 1'b0; product = '0; model = '0;
    #12;
    compare("reset");
    rst_n = 1'b1;
    // one product, one cycle: visible right after the next edge, not before
    @(negedge clk);
    product = 1000; en = 1'b1;
    #1;
    compare("before edge");
    @(posedge clk); #1;
    model = 1000;
    compare("latency");
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      product = rnd();
      en  = 1'($urandom);
      clr = ($urandom % 50) == 0;
      @(posedge clk); #1;
      if (clr) model = '0;
      else if (en) begin
        if ((P + 1)'(model) + (P + 1)'(product) >= (P + 1)'(1) << P) n_wrap++;
        model = model + product;
      end
      compare("run");
    end
    // asynchronous reset between edges
    @(negedge clk);
    rst_n = 1'b0;
    #1;
    model = '0;
    compare("async reset");
    checks++;
    if (n_wrap == 0) begin
      failures++;
      $display("FAIL no wrap-around happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
