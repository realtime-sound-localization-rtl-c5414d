// realmult: signed multiplier, p = a * b, full precision (AW+BW bits).
//
// Combinational. Used for the squared magnitudes in frequency detection and
// in the weight block, and as the four partial products of compmult. The
// document names a dedicated real multiplier block; its width and its
// (absent) pipelining are this design's choice.
module realmult #(
  parameter int AW = 14,
  parameter int BW = 14
) (
  input  logic signed [AW-1:0]    a,
  input  logic signed [BW-1:0]    b,
  output logic signed [AW+BW-1:0] p
);
  always_comb p = (AW+BW)'(a) * (AW+BW)'(b);
endmodule
