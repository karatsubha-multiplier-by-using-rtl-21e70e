// kara_pkg: width arithmetic shared by the Karatsuba multiplier stages.
//
// A WIDTH-bit operand is split into a low half of WIDTH/2 bits and a high
// half holding the remaining bits (equal halves for even WIDTH, the
// 32-bit case). The sum of the two halves needs one bit more than the
// wider half, so the middle product is (hi_w+1) x (hi_w+1) bits. These
// functions give those widths so that every stage agrees on them.
package kara_pkg;

  // Width of the low half of a WIDTH-bit operand.
  function automatic int unsigned lo_w(int unsigned width);
    return width / 2;
  endfunction

  // Width of the high half (the wider one when WIDTH is odd).
  function automatic int unsigned hi_w(int unsigned width);
    return width - width / 2;
  endfunction

  // Width of hi + lo, keeping the carry.
  function automatic int unsigned sum_w(int unsigned width);
    return hi_w(width) + 1;
  endfunction

  // Width of the middle product (sum x sum).
  function automatic int unsigned mid_w(int unsigned width);
    return 2 * sum_w(width);
  endfunction

  // Narrowest operand that a further Karatsuba level is applied to;
  // narrower factors go straight to a leaf multiplier.
  function automatic int unsigned min_split_w();
    return 4;
  endfunction

endpackage
