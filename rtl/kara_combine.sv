// kara_combine: recombination of the three Karatsuba partial results.
//
// Forms q = p2 * 2^(2H) + mid * 2^H + p0, with H the low-half width
// (WIDTH/2). This is the halves version of the two-digit rule
// a*b = (a1 b1) 2^2 + (a1 b0 + a0 b1) 2 + a0 b0. Because p0 has exactly
// 2H bits, p2 and p0 occupy disjoint bit ranges and are simply
// concatenated; only the shifted middle term goes through an adder.
//
// Interface: p0 (2*lo_w bits), p2 (2*hi_w bits), mid (PW bits) in;
// q (2*WIDTH bits) out. Timing: combinational.
//
// The weights follow the algorithm; the concatenate-then-add structure
// is this design's choice.
module kara_combine
  import kara_pkg::*;
#(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned PW    = 34
) (
  input  logic [2*lo_w(WIDTH)-1:0] p0,
  input  logic [2*hi_w(WIDTH)-1:0] p2,
  input  logic [PW-1:0]            mid,
  output logic [2*WIDTH-1:0]       q
);

  localparam int unsigned LW = lo_w(WIDTH);

  logic [2*WIDTH-1:0] outer;
  logic [2*WIDTH-1:0] shifted_mid;

  always_comb begin
    outer = {p2, p0};
    shifted_mid = (2*WIDTH)'(mid) << LW;
    q     = outer + shifted_mid;
  end

endmodule
