// rsu: radix selection unit of the Nikhilam multiplier. For an N-bit
// unsigned x it picks the base R = 2^k nearest to x and gives
//   exponent = k,  radix = R,  residue = x - R  (two's complement, N+1 bits)
// k is the position p of the leading one of x, raised to p+1 when the bit
// below the leading one is set (x >= 1.5 * 2^p; on a tie the larger base is
// taken). k is capped at N-1 so that both residues of the multiplier fit in
// N-bit magnitudes; x = 0 gives k = 0. Purely combinational: a priority
// encoder, a decoder and an N+1-bit subtractor.
// Choosing the nearest base follows the source's Nikhilam method ("complements
// it from its nearest base"); the binary rounding rule, the cap and the
// widths are this design's choices.
module rsu #(
  parameter int unsigned N  = 16,
  parameter int unsigned KW = $clog2(N)
) (
  input  logic [N-1:0]  x,
  output logic [KW-1:0] exponent,
  output logic [N-1:0]  radix,
  output logic [N:0]    residue
);
  logic [KW-1:0] p;      // leading-one position
  logic          round_up;

  always_comb begin
    p = '0;
    for (int i = 0; i < N; i++) begin
      if (x[i]) p = KW'(i);
    end
  end

  always_comb begin
    round_up = 1'b0;
    if (p != '0) round_up = x[p - 1'b1];
    if (round_up && p != KW'(N - 1)) exponent = p + 1'b1;
    else                             exponent = p;
  end

  assign radix = N'(1) << exponent;

  logic co;
  addsub #(.W(N+1)) u_res (
    .a({1'b0, x}), .b({1'b0, radix}), .sub(1'b1), .y(residue), .cout(co)
  );
endmodule
