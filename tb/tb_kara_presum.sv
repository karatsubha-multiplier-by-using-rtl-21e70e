// tb_kara_presum: checks the Karatsuba pre-adders at 32 bits and at an
// odd width (37, split 18 low / 19 high). Each sum must equal high half
// plus low half with the carry kept. Corner and random operands; counts
// a failure if no carry-out case is seen. Combinational: outputs are
// sampled 1 ns after the inputs change.
module tb_kara_presum;

  logic [31:0] a32, b32;
  logic [16:0] sa32, sb32;
  logic [36:0] a37, b37;
  logic [19:0] sa37, sb37;

  int checks = 0;
  int failures = 0;
  int n_carry = 0;

  kara_presum #(.WIDTH(32)) dut32 (.a(a32), .b(b32), .sa(sa32), .sb(sb32));
  kara_presum #(.WIDTH(37)) dut37 (.a(a37), .b(b37), .sa(sa37), .sb(sb37));

  task automatic check(input logic [63:0] got, input logic [63:0] expect_v, input string what);
    checks++;
    if (got !== expect_v) begin
      failures++;
      $display("MISMATCH %s got=%h expected=%h", what, got, expect_v);
    end
  endtask

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    for (int i = 0; i < 3000; i++) begin
      case (i)
        0:       begin a32 = '0; b32 = '1; a37 = '0; b37 = '1; end
        1:       begin a32 = '1; b32 = 32'h0001_ffff; a37 = '1; b37 = 37'h1; end
        default: begin
          a32 = $urandom; b32 = $urandom;
          a37 = 37'({$urandom, $urandom});
          b37 = 37'({$urandom, $urandom});
        end
      endcase
      #1;
      check(64'(sa32), 64'(a32 >> 16) + 64'(a32 & 32'hffff), "sa32");
      check(64'(sb32), 64'(b32 >> 16) + 64'(b32 & 32'hffff), "sb32");
      check(64'(sa37), 64'(a37 >> 18) + 64'(a37 & 37'h3ffff), "sa37");
      check(64'(sb37), 64'(b37 >> 18) + 64'(b37 & 37'h3ffff), "sb37");
      if (sa32[16]) n_carry++;
    end
    if (n_carry == 0) begin failures++; $display("never reached: pre-sum carry"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
