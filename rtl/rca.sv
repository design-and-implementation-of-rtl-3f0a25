// rca: W-bit ripple carry adder, a chain of W full adders in which each
// stage adds its two operand bits and the carry from the stage below.
//   {cout, sum} = a + b + cin
// Purely combinational; the delay grows linearly with W, as the carry ripples
// from bit 0 to bit W-1. The chain structure follows the source's ripple carry
// adder; it is also the adder this design uses for every two-operand addition
// inside the multipliers (the source names those "ADDER n bit" only).
// Each stage keeps its carry in its own generate scope so that the chain is a
// set of separate one-bit nets rather than one vector that feeds itself.
module rca #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  for (genvar i = 0; i < W; i++) begin : g_bit
    logic ci;
    logic co;
    if (i == 0) begin : g_first
      assign ci = cin;
    end else begin : g_next
      assign ci = g_bit[i-1].co;
    end
    full_adder u_fa (.a(a[i]), .b(b[i]), .cin(ci), .sum(sum[i]), .cout(co));
  end
  assign cout = g_bit[W-1].co;
endmodule
