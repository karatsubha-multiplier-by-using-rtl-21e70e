// kara_product: leaf multiplier for one Karatsuba partial product.
//
// Square unsigned multiplier, p = x * y, with the full 2*WIDTH-bit
// result. It is written as a plain multiply so that the synthesis tool
// maps it to its own multiplier (DSP block or LUT array), as the native
// multipliers of the reference schematic are. karatsuba_multiplier uses
// it for each of its three partial products once no further Karatsuba
// level is to be applied.
//
// Interface: x, y (WIDTH bits) in; p (2*WIDTH bits) out.
// Timing: combinational.
module kara_product #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0]   x,
  input  logic [WIDTH-1:0]   y,
  output logic [2*WIDTH-1:0] p
);

  always_comb p = (2*WIDTH)'(x) * (2*WIDTH)'(y);

endmodule
