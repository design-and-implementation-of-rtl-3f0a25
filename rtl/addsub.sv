// addsub: W-bit adder/subtractor on a ripple carry adder.
//   sub = 0: {cout, y} = a + b
//   sub = 1: {cout, y} = a + ~b + 1 = a - b  (cout = 1 means no borrow)
// The b operand is inverted by XOR with sub and sub is fed in as the carry,
// so one adder serves both operations. Purely combinational. Works for
// unsigned and two's-complement operands alike; the caller chooses how to
// read cout. The source names the adder/subtractor but not its insides;
// this structure is this design's choice.
module addsub #(
  parameter int unsigned W = 256
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         sub,
  output logic [W-1:0] y,
  output logic         cout
);
  rca #(.W(W)) u_rca (
    .a(a), .b(b ^ {W{sub}}), .cin(sub), .sum(y), .cout(cout)
  );
endmodule
