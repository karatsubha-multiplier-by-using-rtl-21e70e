// karatsuba_multiplier: combinational 32 x 32 -> 64-bit Karatsuba multiplier.
//
// The operands are split into halves, a = a_hi*2^H + a_lo and
// b = b_hi*2^H + b_lo (H = WIDTH/2 = 16). Instead of the four half-size
// products of long multiplication only three are formed:
//   p0 = a_lo * b_lo
//   p2 = a_hi * b_hi
//   p1 = (a_hi + a_lo) * (b_hi + b_lo)
// and the cross term is recovered as mid = p1 - p2 - p0. The product is
// q = p2*2^(2H) + mid*2^H + p0.
//
// Structure: kara_presum (the two pre-adders) -> three partial-product
// multipliers -> kara_middle (two subtractors) -> kara_combine (shifted
// addition). With LEVELS = 1 (default) the three products are leaf
// multipliers (kara_product), the one-level structure of the reference
// schematic. With LEVELS > 1 each product is itself a karatsuba_multiplier
// with one level fewer, down to operands of kara_pkg::min_split_w() (4) bits.
//
// Interface: a, b (WIDTH bits, unsigned) in; q = a*b (2*WIDTH bits) out.
// Timing: purely combinational, no clock, zero cycles of latency.
//
// From the reference: the 32-bit operands and 64-bit result, the port
// names a, b, q and the adder / multiplier / subtractor structure. This
// design's own choices: unsigned operands, carry-keeping 17-bit pre-sums
// and a 34-bit middle product (so that the result is exact), the explicit
// recombination adder, and the LEVELS parameter.
module karatsuba_multiplier
  import kara_pkg::*;
#(
  parameter int unsigned WIDTH  = 32,
  parameter int unsigned LEVELS = 1
) (
  input  logic [WIDTH-1:0]   a,
  input  logic [WIDTH-1:0]   b,
  output logic [2*WIDTH-1:0] q
);

  localparam int unsigned LW  = lo_w(WIDTH);
  localparam int unsigned HW  = hi_w(WIDTH);
  localparam int unsigned SW  = sum_w(WIDTH);
  localparam int unsigned PW  = mid_w(WIDTH);
  localparam int unsigned SUB = (LEVELS > 0) ? LEVELS - 1 : 0;
  localparam int unsigned RW  = 2 * HW;  // width of p2 (and of p0, widened)

  if (LEVELS < 1) begin : g_bad_levels
    $error("karatsuba_multiplier: LEVELS must be at least 1");
  end

  logic [SW-1:0]   sa, sb;
  logic [2*LW-1:0] p0;
  logic [2*HW-1:0] p2;
  logic [PW-1:0]   p1;
  logic [PW-1:0]   mid;

  kara_presum #(.WIDTH(WIDTH)) u_presum (
    .a (a),
    .b (b),
    .sa(sa),
    .sb(sb)
  );

  // The three partial products. Below the last level (or for operands
  // too narrow to split) each is a leaf multiplier; otherwise it is a
  // further Karatsuba stage with one level fewer.
  localparam bit LEAF_P0 = (SUB == 0) || (LW < min_split_w());
  localparam bit LEAF_P2 = (SUB == 0) || (HW < min_split_w());
  localparam bit LEAF_P1 = (SUB == 0) || (SW < min_split_w());

  // p0: low halves.
  if (LEAF_P0) begin : g_p0_leaf
    kara_product #(.WIDTH(LW)) u_p0 (.x(a[LW-1:0]), .y(b[LW-1:0]), .p(p0));
  end else begin : g_p0_stage
    karatsuba_multiplier #(.WIDTH(LW), .LEVELS(SUB)) u_p0 (
      .a(a[LW-1:0]), .b(b[LW-1:0]), .q(p0));
  end

  // p2: high halves.
  if (LEAF_P2) begin : g_p2_leaf
    kara_product #(.WIDTH(HW)) u_p2 (.x(a[WIDTH-1:LW]), .y(b[WIDTH-1:LW]), .p(p2));
  end else begin : g_p2_stage
    karatsuba_multiplier #(.WIDTH(HW), .LEVELS(SUB)) u_p2 (
      .a(a[WIDTH-1:LW]), .b(b[WIDTH-1:LW]), .q(p2));
  end

  // p1: sums of halves.
  if (LEAF_P1) begin : g_p1_leaf
    kara_product #(.WIDTH(SW)) u_p1 (.x(sa), .y(sb), .p(p1));
  end else begin : g_p1_stage
    karatsuba_multiplier #(.WIDTH(SW), .LEVELS(SUB)) u_p1 (
      .a(sa), .b(sb), .q(p1));
  end

  kara_middle #(.PW(PW), .RW(RW)) u_middle (
    .p1 (p1),
    .p0 (RW'(p0)),
    .p2 (p2),
    .mid(mid)
  );

  kara_combine #(.WIDTH(WIDTH), .PW(PW)) u_combine (
    .p0 (p0),
    .p2 (p2),
    .mid(mid),
    .q  (q)
  );

endmodule
