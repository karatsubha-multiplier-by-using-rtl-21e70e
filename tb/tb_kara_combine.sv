// tb_kara_combine: checks the recombination q = p2*2^32 + mid*2^16 + p0
// at the 32-bit default. p0, p2 and mid are drawn at random over their
// whole ranges (mid up to 34 bits) and q is compared with the weighted
// sum computed here modulo 2^64. Combinational: sampled 1 ns after each change.
module tb_kara_combine;

  logic [31:0] p0, p2;
  logic [33:0] mid;
  logic [63:0] q;

  int checks = 0;
  int failures = 0;
  int n_carry = 0;

  kara_combine dut (.p0(p0), .p2(p2), .mid(mid), .q(q));

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    logic [63:0] expect_q;
    for (int i = 0; i < 5000; i++) begin
      p0  = $urandom;
      p2  = (i == 0) ? 32'hffff_fffe : $urandom;
      mid = (i == 0) ? 34'h1_ffff_fffe : {2'($urandom), 32'($urandom)};
      #1;
      expect_q = (64'(p2) << 32) + (64'(mid) << 16) + 64'(p0);
      if (64'(mid << 16) + 64'(p0) >= 64'h1_0000_0000) n_carry++;
      checks++;
      if (q !== expect_q) begin
        failures++;
        $display("MISMATCH q=%h expected=%h", q, expect_q);
      end
    end
    if (n_carry == 0) begin failures++; $display("never reached: carry into the high product"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
