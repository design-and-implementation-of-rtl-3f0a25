// tb_vedic_top: end-to-end test of the whole design. The arithmetic unit
// runs at the width given by parameter TN (32 here, so that the Vedic
// multiplier has two split levels above the 8x8 block); the Nikhilam
// multiplier runs at its default 16 bits. Each cycle drives random
// operands to both; checks product, sum, difference, borrow, the MAC
// accumulator (one cycle after the operands) and the Nikhilam product.
// It counts each mechanism of the design (carry out of the sum, borrow,
// accumulate, hold, clear, accumulator wrap-around, Nikhilam base rounded up
// and down, negative residue product) and fails if one never happened.
module tb_vedic_top #(
  parameter int TN = 32
);
  localparam int N = TN;
  localparam int NK = 16;
  logic            clk = 1'b0;
  logic            rst_n, acc_clr, acc_en;
  logic [N-1:0]    a, b, difference;
  logic [2*N-1:0]  product, acc, model;
  logic [N:0]      sum;
  logic            borrow;
  logic [NK-1:0]   nk_x, nk_y;
  logic [2*NK-1:0] nk_p;
  logic [3:0]      nk_exponent;
  int checks = 0, failures = 0;
  int cycles = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  typedef enum int {
    EV_CARRY, EV_BORROW, EV_ACCUM, EV_HOLD, EV_CLEAR, EV_WRAP,
    EV_NK_UP, EV_NK_DOWN, EV_NK_NEG, EV_COUNT
  } event_e;
  int n_ev[EV_COUNT];
  string ev_name[EV_COUNT] = '{"sum carry out", "borrow", "accumulate", "hold",
                               "clear", "accumulator wrap", "Nikhilam base rounded up",
                               "Nikhilam base rounded down", "Nikhilam negative residue product"};

  vedic_top #(.N(N)) dut (
    .clk(clk), .rst_n(rst_n), .a(a), .b(b), .acc_clr(acc_clr), .acc_en(acc_en),
    .product(product), .sum(sum), .difference(difference), .borrow(borrow), .acc(acc),
    .nk_x(nk_x), .nk_y(nk_y), .nk_p(nk_p), .nk_exponent(nk_exponent)
  );

  initial begin : watchdog
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input logic [2*N:0] got, input logic [2*N:0] want, input string what);
    checks++;
    if (got !== want) begin
      failures++;
      if (failures < 10) $display("FAIL %s got=%h want=%h", what, got, want);
    end
  endtask

  function automatic logic [N-1:0] rnd();
    logic [N-1:0] r;
    for (int k = 0; k < (N + 31) / 32; k++) r[k*32 +: 32] = $urandom;
    return r;
  endfunction

  initial begin
    int start;
    foreach (n_ev[i]) n_ev[i] = 0;
    rst_n = 1'b0; acc_clr = 1'b0; acc_en = 1'b0; a = '0; b = '0; nk_x = '0; nk_y = '0;
    model = '0;
    #12 rst_n = 1'b1;
    @(posedge clk); #1;
    start = cycles;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      a = rnd(); b = rnd();
      if (i % 7 == 3) a = {2'b11, a[N-3:0]};   // large operands drive the accumulator around
      acc_en  = ($urandom % 4) != 0;
      acc_clr = ($urandom % 500) == 0;
      nk_x = NK'($urandom); nk_y = NK'($urandom);
      if (i % 5 == 0) nk_x = NK'(16'h0100 + 16'($urandom % 64) - 16'd32);
      #1;
      expect_eq((2*N+1)'(product), (2*N+1)'((2*N)'(a) * (2*N)'(b)), "product");
      expect_eq((2*N+1)'(sum), (2*N+1)'((N+1)'(a) + (N+1)'(b)), "sum");
      expect_eq((2*N+1)'({borrow, difference}), (2*N+1)'({a < b, N'(a - b)}), "difference");
      expect_eq((2*N+1)'(nk_p), (2*N+1)'((2*NK)'(nk_x) * (2*NK)'(nk_y)), "nikhilam");
      if (sum[N]) n_ev[EV_CARRY]++;
      if (borrow) n_ev[EV_BORROW]++;
      if (nk_x != 0 && (32'(1) << nk_exponent) > 32'(nk_x)) n_ev[EV_NK_UP]++;
      if ((32'(1) << nk_exponent) < 32'(nk_x)) n_ev[EV_NK_DOWN]++;
      if (((32'(1) << nk_exponent) > 32'(nk_x)) != ((32'(1) << nk_exponent) > 32'(nk_y)) &&
          (32'(1) << nk_exponent) != 32'(nk_y) && (32'(1) << nk_exponent) != 32'(nk_x)) n_ev[EV_NK_NEG]++;
      @(posedge clk); #1;
      if (acc_clr) begin
        model = '0;
        n_ev[EV_CLEAR]++;
      end else if (acc_en) begin
        if ((2*N+1)'(model) + (2*N+1)'(product) >= ((2*N+1)'(1) << (2*N))) n_ev[EV_WRAP]++;
        model = model + (2*N)'(a) * (2*N)'(b);
        n_ev[EV_ACCUM]++;
      end else begin
        n_ev[EV_HOLD]++;
      end
      // the accumulator shows this cycle's product exactly one edge later
      expect_eq((2*N+1)'(acc), (2*N+1)'(model), "acc");
    end
    checks++;
    if (cycles - start != 20000) begin
      failures++;
      $display("FAIL expected one operation per cycle: %0d cycles for 20000", cycles - start);
    end
    foreach (n_ev[i]) begin
      $display("event %-34s %0d", ev_name[i], n_ev[i]);
      checks++;
      if (n_ev[i] == 0) begin
        failures++;
        $display("FAIL event never happened: %s", ev_name[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
