// tb_parallel_adder4 -- exhaustive check of the 4-bit ripple adder:
// {carry,sum} = a + b + cin for all 512 input combinations.
module tb_parallel_adder4;
  logic [3:0] a, b, sum;
  logic cin, carry;
  int checks = 0, failures = 0;

  parallel_adder4 dut (.a(a), .b(b), .cin(cin), .sum(sum), .carry(carry));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      {cin, a, b} = 9'(v);
      #1;
      checks++;
      if (int'({carry, sum}) != int'(a) + int'(b) + int'(cin)) begin
        failures++;
        $display("FAIL %0d+%0d+%0d -> %0d", a, b, cin, {carry, sum});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
