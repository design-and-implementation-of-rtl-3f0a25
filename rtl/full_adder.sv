// full_adder: one-bit full adder, the cell from which the ripple carry adder
// and the carry save adder are built.
//   sum  = a ^ b ^ cin
//   cout = majority(a, b, cin)
// Purely combinational. The gate-level form (two XORs, carry from generate and
// propagate) is this design's choice; the source only asks for a full adder.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);
  logic p;
  assign p    = a ^ b;
  assign sum  = p ^ cin;
  assign cout = (a & b) | (p & cin);
endmodule
