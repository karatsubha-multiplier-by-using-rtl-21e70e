// kara_presum: the two pre-adders of a Karatsuba stage.
//
// Each operand is cut into a high and a low half and the halves are
// added: sa = a_hi + a_lo, sb = b_hi + b_lo. These sums are the factors
// of the middle product, (a_hi + a_lo)(b_hi + b_lo). The low half is
// WIDTH/2 bits and the high half the rest; each sum is one bit wider
// than the high half so the carry is kept and the later product is exact.
//
// Interface: a, b (WIDTH bits, unsigned) in; sa, sb (hi_w+1 bits) out.
// Timing: combinational.
//
// The two adders correspond to the instances a_b_high_i and a_b_low_i of
// the reference schematic. Keeping the carry bit (17-bit sums for 32-bit
// operands) is this design's choice; it is what makes the product exact.
module kara_presum
  import kara_pkg::*;
#(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0]        a,
  input  logic [WIDTH-1:0]        b,
  output logic [sum_w(WIDTH)-1:0] sa,
  output logic [sum_w(WIDTH)-1:0] sb
);

  localparam int unsigned LW = lo_w(WIDTH);
  localparam int unsigned SW = sum_w(WIDTH);

  always_comb begin
    sa = SW'(a[WIDTH-1:LW]) + SW'(a[LW-1:0]);
    sb = SW'(b[WIDTH-1:LW]) + SW'(b[LW-1:0]);
  end

endmodule
