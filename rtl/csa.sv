// csa: W-bit carry save adder. A row of W independent full adders reduces
// three W-bit numbers x, y, z to a sum word s and a carry word c with
//   x + y + z = s + 2*c
// in the time of one full adder: no carry moves between bit positions. The
// caller finishes the addition with a carry-propagate adder (here the ripple
// carry adder) on s and c shifted left by one. Purely combinational.
// Follows the source's carry save adder (three inputs i, j, k; outputs s, c).
module csa #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic [W-1:0] z,
  output logic [W-1:0] s,
  output logic [W-1:0] c
);
  for (genvar i = 0; i < W; i++) begin : g_bit
    full_adder u_fa (.a(x[i]), .b(y[i]), .cin(z[i]), .sum(s[i]), .cout(c[i]));
  end
endmodule
