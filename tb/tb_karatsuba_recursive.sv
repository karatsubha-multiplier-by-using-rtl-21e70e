// tb_karatsuba_recursive: checks the multi-level form of the Karatsuba
// multiplier. Three instances are compared with products computed here:
// 64 x 64 bits with two levels, 37 x 37 bits (uneven halves) with three
// levels, and 32 x 32 bits with three levels. Corner and random operands;
// combinational, sampled 1 ns after each change.
module tb_karatsuba_recursive;

  logic [63:0]  a64, b64;
  logic [127:0] q64;
  logic [36:0]  a37, b37;
  logic [73:0]  q37;
  logic [31:0]  a32, b32;
  logic [63:0]  q32;

  int checks = 0;
  int failures = 0;

  karatsuba_multiplier #(.WIDTH(64), .LEVELS(2)) dut64 (.a(a64), .b(b64), .q(q64));
  karatsuba_multiplier #(.WIDTH(37), .LEVELS(3)) dut37 (.a(a37), .b(b37), .q(q37));
  karatsuba_multiplier #(.WIDTH(32), .LEVELS(3)) dut32 (.a(a32), .b(b32), .q(q32));

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    logic [127:0] e64;
    logic [127:0] e37, e32;
    for (int i = 0; i < 5000; i++) begin
      if (i == 0) begin a64 = '1; b64 = '1; a37 = '1; b37 = '1; a32 = '1; b32 = '1; end
      else begin
        a64 = {$urandom, $urandom}; b64 = {$urandom, $urandom};
        a37 = 37'({$urandom, $urandom}); b37 = 37'({$urandom, $urandom});
        a32 = $urandom; b32 = $urandom;
        if (i % 3 == 1) begin
          a64 |= 64'hc000_0000_c000_0000; b64 |= 64'hc000_c000_c000_c000;
          a37 |= 37'h18_0006_0000;        b37 |= 37'h18_0006_0000;
        end
      end
      #1;
      e64 = 128'(a64) * 128'(b64);
      e37 = 128'(a37) * 128'(b37);
      e32 = 128'(a32) * 128'(b32);
      checks += 3;
      if (q64 !== e64)          begin failures++; $display("MISMATCH 64: %h*%h=%h", a64, b64, q64); end
      if (128'(q37) !== e37)    begin failures++; $display("MISMATCH 37: %h*%h=%h", a37, b37, q37); end
      if (128'(q32) !== e32)    begin failures++; $display("MISMATCH 32: %h*%h=%h", a32, b32, q32); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
