// tb_compressor_4to2 -- exhaustive check of the 4:2 compressor.
// For all 32 input patterns: x1+x2+x3+x4+cin = sum + 2*(carry+cout), and
// cout must not depend on cin (no carry ripple along a row of cells).
module tb_compressor_4to2;
  logic [3:0] x;
  logic cin, sum, carry, cout, cout0;
  int checks = 0, failures = 0;

  compressor_4to2 dut (.x1(x[0]), .x2(x[1]), .x3(x[2]), .x4(x[3]), .cin(cin),
                       .sum(sum), .carry(carry), .cout(cout));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      x = 4'(v);
      cin = 1'b0;
      #1;
      cout0 = cout;
      for (int ci = 0; ci < 2; ci++) begin
        cin = 1'(ci);
        #1;
        checks++;
        if (int'(sum) + 2 * (int'(carry) + int'(cout)) != $countones(x) + ci) begin
          failures++;
          $display("FAIL x=%b cin=%0d -> sum=%0d carry=%0d cout=%0d", x, cin, sum, carry, cout);
        end
        checks++;
        if (cout != cout0) begin
          failures++;
          $display("FAIL x=%b: cout depends on cin", x);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
