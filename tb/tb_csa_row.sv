// tb_csa_row -- random check of the W-bit carry-save row at its default
// width: a + b + ci = s + 2*co, computed in W+2 bits, plus the bitwise
// full-adder relation at every bit.
module tb_csa_row;
  localparam int W = 20;
  logic [W-1:0] a, b, ci, s, co;
  int checks = 0, failures = 0;

  csa_row dut (.a(a), .b(b), .ci(ci), .s(s), .co(co));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      a  = W'($urandom);
      b  = W'($urandom);
      ci = (n == 0) ? '1 : W'($urandom);
      if (n == 0) begin a = '1; b = '1; end
      #1;
      checks++;
      if ((W+2)'(a) + (W+2)'(b) + (W+2)'(ci) != (W+2)'(s) + ((W+2)'(co) << 1)) begin
        failures++;
        $display("FAIL a=%h b=%h ci=%h -> s=%h co=%h", a, b, ci, s, co);
      end
      checks++;
      if (s != (a ^ b ^ ci)) begin
        failures++;
        $display("FAIL sum bits a=%h b=%h ci=%h -> s=%h", a, b, ci, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
