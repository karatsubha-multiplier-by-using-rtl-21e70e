// tb_kara_product: checks the leaf multiplier at 16 bits (the default,
// the size of the half products) and at 17 bits (the size of the middle
// product's factors). Corner and random factors are compared with a
// product computed here; the result must be full width, so all-ones
// factors check the top bit. Combinational: sampled 1 ns after each change.
module tb_kara_product;

  logic [15:0] x16, y16;
  logic [31:0] p16;
  logic [16:0] x17, y17;
  logic [33:0] p17;

  int checks = 0;
  int failures = 0;

  kara_product dut16 (.x(x16), .y(y16), .p(p16));
  kara_product #(.WIDTH(17)) dut17 (.x(x17), .y(y17), .p(p17));

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    logic [63:0] e16, e17;
    for (int i = 0; i < 5000; i++) begin
      case (i)
        0:       begin x16 = '1; y16 = '1; x17 = '1; y17 = '1; end
        1:       begin x16 = '0; y16 = '1; x17 = 17'h10000; y17 = 17'h10000; end
        default: begin
          x16 = 16'($urandom); y16 = 16'($urandom);
          x17 = 17'($urandom); y17 = 17'($urandom);
        end
      endcase
      #1;
      e16 = 64'(x16) * 64'(y16);
      e17 = 64'(x17) * 64'(y17);
      checks += 2;
      if (64'(p16) !== e16) begin failures++; $display("MISMATCH 16: %h*%h=%h exp %h", x16, y16, p16, e16); end
      if (64'(p17) !== e17) begin failures++; $display("MISMATCH 17: %h*%h=%h exp %h", x17, y17, p17, e17); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
