// tb_nikhilam_mult: Nikhilam multiplier at its default width (16 bits).
// Corner cases (0, 1, all ones, powers of two and their neighbours, values
// just below and above a base) and random operands; the product must equal
// x * y and the base exponent must be the one nearest to x. Counts how
// often each residue sign case occurs and fails if one never did.
module tb_nikhilam_mult;
  localparam int N = 16;
  localparam int KW = $clog2(N);
  logic [N-1:0]   x, y;
  logic [2*N-1:0] p;
  logic [KW-1:0]  exponent;
  int checks = 0, failures = 0;
  int n_case[4];
  logic clk = 1'b0;
  always #5 clk = ~clk;

  nikhilam_mult dut (.x(x), .y(y), .p(p), .exponent(exponent));

  initial begin : watchdog
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int nearest_k(input int v);
    int best_k = 0, best_d = 1 << 30, d;
    for (int k = 0; k < N; k++) begin
      d = (v > (1 << k)) ? v - (1 << k) : (1 << k) - v;
      if (d <= best_d) begin best_d = d; best_k = k; end
    end
    return best_k;
  endfunction

  task automatic check(input int xv, input int yv);
    int k;
    x = N'(xv); y = N'(yv);
    #1;
    k = nearest_k(int'(x));
    n_case[{int'(x) < (1 << k), int'(y) < (1 << k)}]++;
    checks++;
    if (p != (2 * N)'(x) * (2 * N)'(y) || int'(exponent) != k) begin
      failures++;
      if (failures < 10) $display("FAIL %0d * %0d -> %0d (k=%0d, want %0d)", x, y, p, exponent, k);
    end
  endtask

  initial begin
    foreach (n_case[i]) n_case[i] = 0;
    check(92, 94);
    check(0, 0);
    check(0, 12345);
    check(65535, 65535);
    check(65535, 0);
    check(1, 65535);
    for (int k = 0; k < N; k++) begin
      for (int dlt = -2; dlt <= 2; dlt++) begin
        check((1 << k) + dlt, (1 << k) - dlt);
        check((1 << k) + dlt, 65535);
        check(65535 - dlt, (1 << k) + dlt);
      end
    end
    for (int i = 0; i < 100000; i++) check(int'($urandom) & 16'hffff, int'($urandom) & 16'hffff);
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (n_case[i] == 0) begin
        failures++;
        $display("FAIL residue sign case %0d never happened", i);
      end
    end
    $display("residue sign cases (x<R, y<R): ++ %0d  +- %0d  -+ %0d  -- %0d",
             n_case[0], n_case[1], n_case[2], n_case[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
