// tb_cs_tree_9to2 -- random and corner check of the 9:2 compressor tree at
// its default operand width: sum_o + carry_o (in W bits) must equal the
// exact sum of the nine operands, which always fits in W = N+4 bits.
module tb_cs_tree_9to2;
  localparam int N = 16;
  localparam int W = N + 4;
  logic [N-1:0] in [9];
  logic [W-1:0] sum_o, carry_o;
  logic [W-1:0] ref_sum;
  int checks = 0, failures = 0;

  cs_tree_9to2 dut (.in(in), .sum_o(sum_o), .carry_o(carry_o));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      ref_sum = '0;
      for (int k = 0; k < 9; k++) begin
        case (n)
          0:       in[k] = '1;                     // largest sum
          1:       in[k] = '0;
          2:       in[k] = (k == 8) ? '1 : '0;     // one operand at a time
          default: in[k] = N'($urandom);
        endcase
        ref_sum += W'(in[k]);
      end
      #1;
      checks++;
      if (W'(sum_o + carry_o) != ref_sum) begin
        failures++;
        $display("FAIL n=%0d: %h + %h != %h", n, sum_o, carry_o, ref_sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
