// tb_counter_5to3 -- exhaustive check of the 5:3 compressor:
// {s2,s1,s0} must be the number of ones among the five inputs.
module tb_counter_5to3;
  logic [4:0] x;
  logic s0, s1, s2;
  int checks = 0, failures = 0;

  counter_5to3 dut (.a(x[0]), .b(x[1]), .c(x[2]), .d(x[3]), .e(x[4]),
                    .s0(s0), .s1(s1), .s2(s2));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      x = 5'(v);
      #1;
      checks++;
      if (int'({s2, s1, s0}) != $countones(x)) begin
        failures++;
        $display("FAIL x=%b -> %0d", x, {s2, s1, s0});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
