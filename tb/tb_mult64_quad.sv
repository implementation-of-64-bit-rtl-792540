// tb_mult64_quad -- 64 x 64 multiplier of the MAC: corner and random
// operands against the testbench's own 128-bit product.
module tb_mult64_quad;
  logic [63:0]  a, b;
  logic [127:0] p;
  int checks = 0, failures = 0;

  mult64_quad dut (.a(a), .b(b), .p(p));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      case (n)
        0: begin a = '1; b = '1; end
        1: begin a = 64'hFFFF_FFFF_0000_0000; b = 64'h0000_0000_FFFF_FFFF; end
        2: begin a = 64'h0000_0000_FFFF_FFFF; b = 64'hFFFF_FFFF_0000_0000; end
        3: begin a = 64'h8000_0000_0000_0001; b = '1; end
        default: begin a = {$urandom, $urandom}; b = {$urandom, $urandom}; end
      endcase
      #1;
      checks++;
      if (p != 128'(a) * 128'(b)) begin
        failures++;
        $display("FAIL %h*%h -> %h", a, b, p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
