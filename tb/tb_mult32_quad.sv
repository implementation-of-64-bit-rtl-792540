// tb_mult32_quad -- 32 x 32 multiplier built of four 16 x 16 Wallace trees:
// corner and random operands against the testbench's own 64-bit product.
module tb_mult32_quad;
  logic [31:0] a, b;
  logic [63:0] p;
  int checks = 0, failures = 0;

  mult32_quad dut (.a(a), .b(b), .p(p));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 5000; n++) begin
      case (n)
        0: begin a = '1; b = '1; end
        1: begin a = 32'hFFFF_0000; b = 32'h0000_FFFF; end
        2: begin a = 32'h0000_FFFF; b = 32'hFFFF_0000; end
        3: begin a = 32'h1; b = 32'hFFFF_FFFF; end
        default: begin a = $urandom; b = $urandom; end
      endcase
      #1;
      checks++;
      if (p != 64'(a) * 64'(b)) begin
        failures++;
        $display("FAIL %h*%h -> %h", a, b, p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
