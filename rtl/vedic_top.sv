// vedic_top: the complete design. It holds two multipliers side by side:
//  * arith_unit: the 256-bit arithmetic unit built on the 256x256 Vedic
//    (Urdhva Tiryakbhyam) multiplier: product, sum, difference and a
//    multiply-accumulate register.
//  * nikhilam_mult: the 16x16 Nikhilam-sutra multiplier, which reaches the
//    product through residues from a power-of-two base and uses a 16x16
//    Vedic multiplier for the residue product.
// Everything is combinational except the MAC accumulator, which updates on
// the rising edge of clk when acc_en = 1 (one cycle of latency) and is
// cleared by acc_clr or by the asynchronous active-low rst_n.
// Widths: N (default 256, the source's largest and main multiplier size) for
// the arithmetic unit; NK_N (default 16, this design's choice) for the
// Nikhilam multiplier.
module vedic_top #(
  parameter int unsigned N    = 256,
  parameter int unsigned NK_N = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // arithmetic unit
  input  logic [N-1:0]            a,
  input  logic [N-1:0]            b,
  input  logic                    acc_clr,
  input  logic                    acc_en,
  output logic [2*N-1:0]          product,
  output logic [N:0]              sum,
  output logic [N-1:0]            difference,
  output logic                    borrow,
  output logic [2*N-1:0]          acc,
  // Nikhilam multiplier
  input  logic [NK_N-1:0]         nk_x,
  input  logic [NK_N-1:0]         nk_y,
  output logic [2*NK_N-1:0]       nk_p,
  output logic [$clog2(NK_N)-1:0] nk_exponent
);
  arith_unit #(.N(N)) u_arith (
    .clk(clk), .rst_n(rst_n), .a(a), .b(b), .acc_clr(acc_clr), .acc_en(acc_en),
    .product(product), .sum(sum), .difference(difference), .borrow(borrow), .acc(acc)
  );

  nikhilam_mult #(.N(NK_N)) u_nikhilam (
    .x(nk_x), .y(nk_y), .p(nk_p), .exponent(nk_exponent)
  );
endmodule
