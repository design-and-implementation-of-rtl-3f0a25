// vedic_mult: NxN-bit unsigned Vedic multiplier, c = a * b, built recursively.
// With H = N/2, a = {AH, AL} and b = {BH, BL}, four HxH multipliers give
//   q0 = AL.BL   q1 = AH.BL   q2 = AL.BH   q3 = AH.BH
// and three adders combine them:
//   q4 = q1 + q0[N-1:H]            N-bit adder
//   q5 = {q3, H zeros} + q2        3H-bit adder (its low H bits add zeros)
//   q6 = q5 + q4                   3H-bit adder
//   c  = {q6, q0[H-1:0]}
// None of the adders can overflow, since each partial sum is bounded by the
// product it belongs to. Every adder is a ripple carry adder. The multiplier
// is purely combinational: no clock, no registers.
// For N >= 16 each HxH multiplier is again a vedic_mult; N = 8, 4 and 2 map
// onto the dedicated 8x8, 4x4 and 2x2 blocks, so the default N = 256 is a
// tree of 128, 64, 32, 16, 8, 4 and 2-bit levels.
// The 256x256 arrangement (four 128x128 multipliers, a 256-bit adder and two
// 384-bit adders, product split into c[511:128] and c[127:0]) follows the
// source's block diagram and schematic; using the same arrangement at the
// 16 to 128-bit levels, and ripple carry adders throughout, are this design's
// choices. N must be a power of two, at least 2.
// The lint check of Verilator, with vedic_mult itself as the top module, reports
// q0-q3 as undriven and a, b as unused: it does not expand the
// self-instances of a recursive top. Instantiated in a design, as
// everywhere here, the tree is complete and simulates correctly.
module vedic_mult #(
  parameter int unsigned N = 256
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] c
);
  localparam int unsigned H = N / 2;

  if (N < 2 || (N & (N - 1)) != 0) begin : g_bad_width
    $error("vedic_mult: N must be a power of two and at least 2");
  end

  if (N == 2) begin : g_2x2
    vedic_2x2 u_mul (.a(a), .b(b), .q(c));
  end else if (N == 4) begin : g_4x4
    vedic_4x4 u_mul (.a(a), .b(b), .q(c));
  end else if (N == 8) begin : g_8x8
    vedic_8x8 u_mul (.a(a), .b(b), .q(c));
  end else begin : g_split
    logic [N-1:0] q0, q1, q2, q3;
    vedic_mult #(.N(H)) u_q0 (.a(a[H-1:0]), .b(b[H-1:0]), .c(q0));
    vedic_mult #(.N(H)) u_q1 (.a(a[N-1:H]), .b(b[H-1:0]), .c(q1));
    vedic_mult #(.N(H)) u_q2 (.a(a[H-1:0]), .b(b[N-1:H]), .c(q2));
    vedic_mult #(.N(H)) u_q3 (.a(a[N-1:H]), .b(b[N-1:H]), .c(q3));

    logic [N-1:0]   q4;
    logic [3*H-1:0] q5, q6;
    logic           co4, co5, co6;   // always 0, see above
    rca #(.W(N)) u_add_q4 (
      .a(q1), .b({{H{1'b0}}, q0[N-1:H]}), .cin(1'b0), .sum(q4), .cout(co4)
    );
    rca #(.W(3*H)) u_add_q5 (
      .a({q3, {H{1'b0}}}), .b({{H{1'b0}}, q2}), .cin(1'b0), .sum(q5), .cout(co5)
    );
    rca #(.W(3*H)) u_add_q6 (
      .a(q5), .b({{H{1'b0}}, q4}), .cin(1'b0), .sum(q6), .cout(co6)
    );
    assign c = {q6, q0[H-1:0]};
  end
endmodule
