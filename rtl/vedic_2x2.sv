// vedic_2x2: 2x2-bit Urdhva Tiryakbhyam ("vertically and crosswise")
// multiplier, the leaf of every larger Vedic multiplier in this design.
//   q[0] = a0.b0                        (vertical, right column)
//   q[1] = a1.b0 + a0.b1                (crosswise, half adder, carry c1)
//   q[2] = a1.b1 + c1                   (vertical, left column, half adder)
//   q[3] = carry of q[2]
// Four AND gates and two half adders, purely combinational, q = a * b.
// This structure is the one the source describes for its 2x2 block.
module vedic_2x2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] q
);
  logic c1;
  assign q[0] = a[0] & b[0];
  half_adder u_ha_cross (.a(a[1] & b[0]), .b(a[0] & b[1]), .sum(q[1]), .cout(c1));
  half_adder u_ha_top   (.a(a[1] & b[1]), .b(c1),          .sum(q[2]), .cout(q[3]));
endmodule
