// kara_middle: recovers the cross term of a Karatsuba stage.
//
// With p1 = (a_hi + a_lo)(b_hi + b_lo), p2 = a_hi*b_hi and p0 = a_lo*b_lo,
// the cross term a_hi*b_lo + a_lo*b_hi equals p1 - p2 - p0. It is formed
// by two subtractors in a chain: c1 = p1 - p0, then mid = c1 - p2. For
// products of real halves the result is never negative, so unsigned
// PW-bit arithmetic is exact.
//
// Interface: p1 (PW bits), p0 and p2 (RW bits) in; mid (PW bits) out.
// Timing: combinational.
//
// The two subtractors correspond to the RTL_SUB instances of the
// reference schematic (c1_i and the one after it); the order in which
// p0 and p2 are taken off is this design's choice.
module kara_middle #(
  parameter int unsigned PW = 34,
  parameter int unsigned RW = 32
) (
  input  logic [PW-1:0] p1,
  input  logic [RW-1:0] p0,
  input  logic [RW-1:0] p2,
  output logic [PW-1:0] mid
);

  logic [PW-1:0] c1;

  always_comb begin
    c1  = p1 - PW'(p0);
    mid = c1 - PW'(p2);
  end

endmodule
