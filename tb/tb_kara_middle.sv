// tb_kara_middle: checks the cross-term subtractors. Random 16-bit halves
// a_hi, a_lo, b_hi, b_lo are drawn; p0, p2 and p1 are formed here and
// the block's mid must equal a_hi*b_lo + a_lo*b_hi, computed directly.
// Combinational: sampled 1 ns after each change.
module tb_kara_middle;

  logic [33:0] p1;
  logic [31:0] p0, p2;
  logic [33:0] mid;

  int checks = 0;
  int failures = 0;

  kara_middle dut (.p1(p1), .p0(p0), .p2(p2), .mid(mid));

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    logic [15:0] ah, al, bh, bl;
    logic [63:0] expect_mid;
    for (int i = 0; i < 5000; i++) begin
      if (i == 0) begin ah = '1; al = '1; bh = '1; bl = '1; end
      else if (i == 1) begin ah = '1; al = '0; bh = '0; bl = '1; end
      else begin
        ah = 16'($urandom); al = 16'($urandom); bh = 16'($urandom); bl = 16'($urandom);
      end
      p0 = 32'(al) * 32'(bl);
      p2 = 32'(ah) * 32'(bh);
      p1 = (34'(ah) + 34'(al)) * (34'(bh) + 34'(bl));
      #1;
      expect_mid = 64'(ah) * 64'(bl) + 64'(al) * 64'(bh);
      checks++;
      if (64'(mid) !== expect_mid) begin
        failures++;
        $display("MISMATCH mid=%h expected=%h", mid, expect_mid);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
