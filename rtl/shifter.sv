// shifter: logarithmic left shifter, y = d << sh (zeros shifted in).
// Stage j shifts by 2^j when sh[j] is set, so SW stages of 2:1 multiplexers
// cover shifts 0 .. 2^SW - 1. Purely combinational. Used by the Nikhilam
// multiplier to scale by its power-of-two base; the source names a shifter,
// the barrel structure is this design's choice.
module shifter #(
  parameter int unsigned W  = 34,
  parameter int unsigned SW = 4
) (
  input  logic [W-1:0]  d,
  input  logic [SW-1:0] sh,
  output logic [W-1:0]  y
);
  logic [W-1:0] stage [SW+1];
  assign stage[0] = d;
  for (genvar j = 0; j < SW; j++) begin : g_stage
    assign stage[j+1] = sh[j] ? (stage[j] << (2 ** j)) : stage[j];
  end
  assign y = stage[SW];
endmodule
