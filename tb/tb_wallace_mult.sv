// tb_wallace_mult -- checks the modified Wallace multiplier at N = 64
// (default), 16, 10 and 4.
// Products are compared with the testbench's own a*b on corner and random
// operands. The reduction schedule is checked too: the stage count must
// follow r(j+1) = 2*floor(r(j)/3) + r(j) mod 3 (recomputed here), which for
// N = 64 gives 10 stages, and for N = 64 half adders may appear only in the
// tenth stage.
module tb_wallace_mult;
  int checks = 0, failures = 0;

  logic [63:0]  a64, b64;
  logic [127:0] p64;
  logic [15:0]  a16, b16;
  logic [31:0]  p16;
  logic [9:0]   a10, b10;
  logic [19:0]  p10;
  logic [3:0]   a4, b4;
  logic [7:0]   p4;

  wallace_mult             dut64 (.a(a64), .b(b64), .p(p64));
  wallace_mult #(.N(16))   dut16 (.a(a16), .b(b16), .p(p16));
  wallace_mult #(.N(10))   dut10 (.a(a10), .b(b10), .p(p10));
  wallace_mult #(.N(4))    dut4  (.a(a4),  .b(b4),  .p(p4));

  function automatic int stages_for(int n);
    int r = n, k = 0;
    while (r > 2) begin
      r = 2 * (r / 3) + r % 3;
      k++;
    end
    return k;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(dut64.NUM_STAGES == 10, "N=64 must take 10 reduction stages");
    check(dut64.NUM_STAGES == stages_for(64), "N=64 stage count");
    check(dut16.NUM_STAGES == stages_for(16), "N=16 stage count");
    check(dut10.NUM_STAGES == stages_for(10), "N=10 stage count");
    check(dut4.NUM_STAGES  == stages_for(4),  "N=4 stage count");
    check(dut64.HA_FIRST_STAGE == 10, "N=64 half adders only in stage 10");
    $display("N=64: %0d stages, %0d full adders, %0d half adders",
             dut64.NUM_STAGES, dut64.NUM_FA, dut64.NUM_HA);

    // exhaustive at N = 4
    for (int v = 0; v < 256; v++) begin
      {a4, b4} = 8'(v);
      #1;
      check(p4 == 8'(a4) * 8'(b4), $sformatf("N=4 %0d*%0d=%0d", a4, b4, p4));
    end

    for (int n = 0; n < 3000; n++) begin
      case (n)
        0: begin a64 = '1; b64 = '1; a16 = '1; b16 = '1; a10 = '1; b10 = '1; end
        1: begin a64 = '0; b64 = '1; a16 = '0; b16 = '1; a10 = '0; b10 = '1; end
        2: begin a64 = 64'd1 << 63; b64 = '1; a16 = 16'h8000; b16 = '1; a10 = 10'h200; b10 = '1; end
        default: begin
          a64 = {$urandom, $urandom};
          b64 = {$urandom, $urandom};
          if (n % 4 == 0) a64 = a64 | 64'hFFFF_0000_0000_FFFF;
          a16 = 16'($urandom);
          b16 = 16'($urandom);
          a10 = 10'($urandom);
          b10 = 10'($urandom);
        end
      endcase
      #1;
      check(p64 == 128'(a64) * 128'(b64), $sformatf("N=64 %h*%h=%h", a64, b64, p64));
      check(p16 == 32'(a16) * 32'(b16),   $sformatf("N=16 %h*%h=%h", a16, b16, p16));
      check(p10 == 20'(a10) * 20'(b10),   $sformatf("N=10 %h*%h=%h", a10, b10, p10));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
