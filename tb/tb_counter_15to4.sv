// tb_counter_15to4 -- exhaustive check of the 15:4 compressor: for all
// 32768 input words the output must be the number of ones in the word.
module tb_counter_15to4;
  logic [14:0] x;
  logic [3:0]  o;
  int checks = 0, failures = 0;

  counter_15to4 dut (.x(x), .o(o));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32768; v++) begin
      x = 15'(v);
      #1;
      checks++;
      if (int'(o) != $countones(x)) begin
        failures++;
        if (failures < 10) $display("FAIL x=%b -> %0d", x, o);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
