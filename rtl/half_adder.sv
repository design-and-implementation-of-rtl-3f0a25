// half_adder: one-bit half adder (sum = a ^ b, carry = a & b). Used by the
// 2x2 Vedic multiplier to add the crosswise products and to fold the carry
// into the vertical product of the top bits. Purely combinational.
module half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic cout
);
  assign sum  = a ^ b;
  assign cout = a & b;
endmodule
