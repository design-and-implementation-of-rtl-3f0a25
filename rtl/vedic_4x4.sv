// vedic_4x4: 4x4-bit unsigned Vedic multiplier built from four 2x2 blocks.
// The operands are split into halves, a = {AH, AL} and b = {BH, BL}, and
//   a * b = AH.BH << 4 + (AH.BL + AL.BH) << 2 + AL.BL
// Stage 1 adds the two crosswise products and the upper half of AL.BL in a
// carry save adder, then resolves sum and carry words in a ripple carry
// adder. Its low 2 bits are product bits q[3:2]; its upper bits go to
// stage 2, which adds them to AH.BH to give q[7:4]. The low 2 bits of
// AL.BL are q[1:0] directly. Purely combinational.
// The source builds its 8x8 block this way and says the 4x4 block is the
// basic block of the 8x8 one, made of 2x2 blocks; that the 4x4 level uses the
// same two-adder arrangement as the 8x8 block is this design's choice.
// The stage-1 sum needs 5 bits (N+1, three operands); all of its upper bits are carried
// into stage 2.
module vedic_4x4 (
  input  logic [3:0]  a,
  input  logic [3:0]  b,
  output logic [7:0] q
);
  localparam int unsigned N = 4;
  localparam int unsigned H = N / 2;

  logic [N-1:0] p_ll, p_hl, p_lh, p_hh;   // AL.BL, AH.BL, AL.BH, AH.BH
  vedic_2x2 u_ll (.a(a[H-1:0]), .b(b[H-1:0]), .q(p_ll));
  vedic_2x2 u_hl (.a(a[N-1:H]), .b(b[H-1:0]), .q(p_hl));
  vedic_2x2 u_lh (.a(a[H-1:0]), .b(b[N-1:H]), .q(p_lh));
  vedic_2x2 u_hh (.a(a[N-1:H]), .b(b[N-1:H]), .q(p_hh));

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
