// tb_karatsuba_multiplier: end-to-end test of the 32 x 32 -> 64-bit
// Karatsuba multiplier at its default parameters.
//
// Applies corner operands (zero, one, all ones, single bits, halves of
// all ones) and random operands, waits 1 ns for the combinational logic
// to settle and compares q with a 64-bit product computed here. Random
// operands are biased so that every internal case is reached; the bench
// counts, from the operands alone, how often
//   - the a pre-sum a_hi + a_lo carries into bit 16,
//   - the b pre-sum carries,
//   - both carry, so the middle product uses its top bits,
//   - the shifted cross term carries into the high product's bits,
// and counts a failure for any case never reached. A watchdog ends the
// run with a failure if it does not finish in time.
module tb_karatsuba_multiplier;

  localparam int unsigned W = 32;
  localparam int unsigned H = W / 2;

  logic [W-1:0]   a, b;
  logic [2*W-1:0] q;

  int checks = 0;
  int failures = 0;
  int n_carry_a = 0, n_carry_b = 0, n_carry_both = 0, n_combine_carry = 0;

  karatsuba_multiplier dut (.a(a), .b(b), .q(q));

  task automatic apply(input logic [W-1:0] x, input logic [W-1:0] y);
    logic [2*W-1:0] expect_q;
    logic [H:0]     sx, sy;
    logic [2*W-1:0] cross_term;
    a = x;
    b = y;
    #1;
    expect_q = {{W{1'b0}}, x} * {{W{1'b0}}, y};
    checks++;
    if (q !== expect_q) begin
      failures++;
      $display("MISMATCH a=%h b=%h q=%h expected=%h", x, y, q, expect_q);
    end
    sx = {1'b0, x[W-1:H]} + {1'b0, x[H-1:0]};
    sy = {1'b0, y[W-1:H]} + {1'b0, y[H-1:0]};
    if (sx[H]) n_carry_a++;
    if (sy[H]) n_carry_b++;
    if (sx[H] && sy[H]) n_carry_both++;
    // Cross term a_hi*b_lo + a_lo*b_hi, shifted by H, added to {p2, p0}:
    // it carries into the high product's bits when the low 2H bits of
    // the sum overflow.
    cross_term = 64'(x[W-1:H]) * 64'(y[H-1:0]) + 64'(x[H-1:0]) * 64'(y[W-1:H]);
    if ((65'(cross_term[H+1:0]) << H) + 65'(64'(x[H-1:0]) * 64'(y[H-1:0])) >= (65'd1 << (2*H)))
      n_combine_carry++;
  endtask

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    logic [W-1:0] x, y;
    apply('0, '0);
    apply('1, '1);
    apply('1, 32'd1);
    apply(32'd1, '1);
    apply(32'h0000_ffff, 32'h0000_ffff);
    apply(32'hffff_0000, 32'hffff_0000);
    apply(32'hffff_0000, 32'h0000_ffff);
    apply(32'h8000_8000, 32'h8000_8000);
    apply(32'd12345, 32'd6789);
    for (int i = 0; i < W; i++)
      for (int j = 0; j < W; j += 5)
        apply(W'(1) << i, W'(1) << j);
    for (int i = 0; i < 20000; i++) begin
      x = $urandom;
      y = $urandom;
      // Every fourth vector: set the top bits of both halves so the
      // pre-sums carry.
      if (i % 4 == 1) begin
        x = x | 32'hc000_c000;
        y = y | 32'hc000_c000;
      end
      apply(x, y);
    end
    if (n_carry_a == 0)       begin failures++; $display("never reached: carry in a pre-sum"); end
    if (n_carry_b == 0)       begin failures++; $display("never reached: carry in b pre-sum"); end
    if (n_carry_both == 0)    begin failures++; $display("never reached: carry in both pre-sums"); end
    if (n_combine_carry == 0) begin failures++; $display("never reached: carry of the cross term into the high product"); end
    $display("cases: carry_a=%0d carry_b=%0d carry_both=%0d combine_carry=%0d",
             n_carry_a, n_carry_b, n_carry_both, n_combine_carry);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
