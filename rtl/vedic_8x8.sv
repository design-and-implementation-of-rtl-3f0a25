// vedic_8x8: 8x8-bit unsigned Vedic multiplier built from four 4x4 blocks.
// The operands are split into halves, a = {AH, AL} and b = {BH, BL}, and
//   a * b = AH.BH << 8 + (AH.BL + AL.BH) << 4 + AL.BL
// Stage 1 adds the two crosswise products and the upper half of AL.BL in a
// carry save adder, then resolves sum and carry words in a ripple carry
// adder. Its low 4 bits are product bits q[7:4]; its upper bits go to
// stage 2, which adds them to AH.BH to give q[15:8]. The low 4 bits of
// AL.BL are q[3:0] directly. Purely combinational.
// This arrangement (four 4x4 blocks, a three-input carry save adder, then a
// second adder for the top half) follows the source's 8x8 block diagram.
// The stage-1 sum needs 9 bits (N+1, three operands); all of its upper bits are carried
// into stage 2.
module vedic_8x8 (
  input  logic [7:0]  a,
  input  logic [7:0]  b,
  output logic [15:0] q
);
  localparam int unsigned N = 8;
  localparam int unsigned H = N / 2;

  logic [N-1:0] p_ll, p_hl, p_lh, p_hh;   // AL.BL, AH.BL, AL.BH, AH.BH
  vedic_4x4 u_ll (.a(a[H-1:0]), .b(b[H-1:0]), .q(p_ll));
  vedic_4x4 u_hl (.a(a[N-1:H]), .b(b[H-1:0]), .q(p_hl));
  vedic_4x4 u_lh (.a(a[H-1:0]), .b(b[N-1:H]), .q(p_lh));
  vedic_4x4 u_hh (.a(a[N-1:H]), .b(b[N-1:H]), .q(p_hh));

  // Stage 1: AH.BL + AL.BH + AL.BL[N-1:H], N+1 bits wide.
  logic [N-1:0] cs_s, cs_c;
  logic [N:0]   mid;
  logic         mid_co;
  csa #(.W(N)) u_csa (
    .x(p_hl), .y(p_lh), .z({{H{1'b0}}, p_ll[N-1:H]}), .s(cs_s), .c(cs_c)
  );
  rca #(.W(N+1)) u_mid (
    .a({1'b0, cs_s}), .b({cs_c, 1'b0}), .cin(1'b0), .sum(mid), .cout(mid_co)
  );

  // Stage 2: AH.BH + mid[N:H]; the product fits in 2N bits, so the carry out
  // of this adder is always 0.
  logic hi_co;
  rca #(.W(N)) u_hi (
    .a(p_hh), .b({{(H-1){1'b0}}, mid[N:H]}), .cin(1'b0), .sum(q[2*N-1:N]), .cout(hi_co)
  );

  assign q[N-1:H] = mid[H-1:0];
  assign q[H-1:0] = p_ll[H-1:0];
endmodule
