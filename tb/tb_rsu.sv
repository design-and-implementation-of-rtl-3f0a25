// tb_rsu: radix selection unit at its default width (16 bits), every input
// value. The reference scans all bases 2^k, k = 0 .. N-1, and takes the one
// nearest to x (the larger on a tie); residue must equal x - 2^k.
module tb_rsu;
  localparam int N = 16;
  localparam int KW = $clog2(N);
  logic [N-1:0]  x, radix;
  logic [KW-1:0] exponent;
  logic [N:0]    residue;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  rsu dut (.x(x), .exponent(exponent), .radix(radix), .residue(residue));

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 2 ** N; v++) begin
      int best_k, best_d, d;
      best_k = 0;
      best_d = 1 << 30;
      for (int k = 0; k < N; k++) begin
        d = (v > (1 << k)) ? v - (1 << k) : (1 << k) - v;
        if (d <= best_d) begin best_d = d; best_k = k; end
      end
      x = N'(v);
      #1;
      checks++;
      if (int'(exponent) != best_k || int'(radix) != (1 << best_k) ||
          $signed(residue) != (N + 1)'(v - (1 << best_k))) begin
        failures++;
        if (failures < 10) $display("FAIL x=%0d -> k=%0d R=%0d res=%0d (want k=%0d)",
                                    v, exponent, radix, $signed(residue), best_k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
