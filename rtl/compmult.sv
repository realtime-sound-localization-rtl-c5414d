// compmult: signed complex multiplier, p = a * b.
//
// p.re = a.re*b.re - a.im*b.im, p.im = a.re*b.im + a.im*b.re, computed at
// full precision (AW+BW+1 bits per part) so no result can overflow.
// Combinational: the product is valid in the same cycle as the operands.
// The design uses it for the FFT butterflies and for the steering products
// of the weight block; pipelining is left to the synthesis tool. The
// document names a dedicated complex multiplier block for the steering
// products; its widths and structure here are this design's choice.
module compmult #(
  parameter int AW = 14,
  parameter int BW = 12
) (
  input  logic signed [AW-1:0]    a_re,
  input  logic signed [AW-1:0]    a_im,
  input  logic signed [BW-1:0]    b_re,
  input  logic signed [BW-1:0]    b_im,
  output logic signed [AW+BW:0]   p_re,
  output logic signed [AW+BW:0]   p_im
);
  logic signed [AW+BW-1:0] rr, ii, ri, ir;
  realmult #(.AW(AW), .BW(BW)) u_rr (.a(a_re), .b(b_re), .p(rr));
  realmult #(.AW(AW), .BW(BW)) u_ii (.a(a_im), .b(b_im), .p(ii));
  realmult #(.AW(AW), .BW(BW)) u_ri (.a(a_re), .b(b_im), .p(ri));
  realmult #(.AW(AW), .BW(BW)) u_ir (.a(a_im), .b(b_re), .p(ir));
  always_comb begin
    p_re = (AW+BW+1)'(rr) - (AW+BW+1)'(ii);
    p_im = (AW+BW+1)'(ri) + (AW+BW+1)'(ir);
  end
endmodule
