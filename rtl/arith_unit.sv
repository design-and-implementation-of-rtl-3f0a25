// arith_unit: arithmetic unit around an NxN Vedic multiplier. For operands
// a and b it gives, all at once:
//   product    = a * b                  (2N bits, combinational)
//   sum        = a + b                  (N+1 bits, combinational)
//   difference = a - b mod 2^N, borrow = (a < b)   (combinational)
//   acc        = running sum of products (registered, see mac)
// One Vedic multiplier serves both the product output and the MAC, which
// adds it to its accumulator on each clock edge with acc_en = 1 (acc_clr = 1
// clears it). The sum and the difference come from two adder/subtractor
// instances, one fixed to add, one fixed to subtract.
// The set of operations (multiplier, adder and subtractor, MAC; outputs
// product, sum, difference, accumulated product) follows the source's
// block diagram of the arithmetic unit; operand width N = 256 is taken from
// its multiplier; the clock, reset, MAC controls and output widths are this
// design's choices.
module arith_unit #(
  parameter int unsigned N = 256
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  input  logic           acc_clr,
  input  logic           acc_en,
  output logic [2*N-1:0] product,
  output logic [N:0]     sum,
  output logic [N-1:0]   difference,
  output logic           borrow,
  output logic [2*N-1:0] acc
);
  vedic_mult #(.N(N)) u_mult (.a(a), .b(b), .c(product));

  logic sum_co, diff_co;
  addsub #(.W(N)) u_add (.a(a), .b(b), .sub(1'b0), .y(sum[N-1:0]), .cout(sum_co));
  addsub #(.W(N)) u_sub (.a(a), .b(b), .sub(1'b1), .y(difference), .cout(diff_co));
  assign sum[N] = sum_co;
  assign borrow = ~diff_co;

  mac #(.P(2*N)) u_mac (
    .clk(clk), .rst_n(rst_n), .clr(acc_clr), .en(acc_en), .product(product), .acc(acc)
  );
endmodule
