// tb_wallace_mac_top -- end-to-end test of the top level at its default
// parameters.
//
// MAC part: inner products of random 64-bit vectors (length 16) are computed
// by resetting the accumulator and feeding one element pair per clock; the
// accumulator must equal the testbench's own running sum every cycle and the
// full inner product one cycle after the last pair. One run uses all-ones
// vectors so that the 129-bit accumulator wraps.
// Compressor part, checked every cycle against sums worked out here: the
// 9:2 and 11:2 trees (sum word + carry word = sum of the operands), the 15:4
// counter (number of ones) and the 4:2 cell (x1+..+x4+cin = sum+2*(carry+cout)).
// Each mechanism (reset, accumulate, wrap, completed inner product, and each
// compressor operation) is counted; one that never happened is a failure.
module tb_wallace_mac_top;
  localparam int CS_N = 16;
  localparam int CS_W = CS_N + 4;
  localparam int VLEN = 16;

  logic            clk = 1'b0, mac_rst;
  logic [63:0]     mac_a, mac_b;
  logic [128:0]    mac_acc;
  logic [CS_N-1:0] cs9_in [9];
  logic [CS_W-1:0] cs9_sum, cs9_carry;
  logic [CS_N-1:0] cs11_in [11];
  logic [CS_W-1:0] cs11_sum, cs11_carry;
  logic [14:0]     c15_x;
  logic [3:0]      c15_o;
  logic [3:0]      c42_x;
  logic            c42_cin, c42_sum, c42_carry, c42_cout;

  int checks = 0, failures = 0;
  int n_reset = 0, n_accum = 0, n_wrap = 0, n_dot = 0;
  int n_cs9 = 0, n_cs11 = 0, n_c15 = 0, n_c42 = 0;

  wallace_mac_top dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // drive fresh random compressor inputs and check their outputs
  task automatic compressors();
    logic [CS_W-1:0] r9, r11;
    r9  = '0;
    r11 = '0;
    for (int k = 0; k < 9; k++)  begin cs9_in[k]  = CS_N'($urandom); r9  += CS_W'(cs9_in[k]);  end
    for (int k = 0; k < 11; k++) begin cs11_in[k] = CS_N'($urandom); r11 += CS_W'(cs11_in[k]); end
    if ($urandom % 8 == 0) for (int k = 0; k < 11; k++) begin
      if (k < 9) cs9_in[k] = '1;
      cs11_in[k] = '1;
      r9  = CS_W'(9)  * CS_W'((1 << CS_N) - 1);
      r11 = CS_W'(11) * CS_W'((1 << CS_N) - 1);
    end
    c15_x   = 15'($urandom);
    c42_x   = 4'($urandom);
    c42_cin = 1'($urandom);
    #1;
    check(CS_W'(cs9_sum + cs9_carry) == r9, "9:2 tree sum");
    n_cs9++;
    check(CS_W'(cs11_sum + cs11_carry) == r11, "11:2 tree sum");
    n_cs11++;
    check(int'(c15_o) == $countones(c15_x), "15:4 count");
    n_c15++;
    check(int'(c42_sum) + 2 * (int'(c42_carry) + int'(c42_cout)) ==
          $countones(c42_x) + int'(c42_cin), "4:2 compressor");
    n_c42++;
  endtask

  // one inner product of length VLEN; allones selects all-ones vectors
  task automatic inner_product(bit allones);
    logic [128:0] model;
    logic [127:0] prod;
    mac_rst = 1'b1;
    @(negedge clk);
    @(posedge clk); #1;
    check(mac_acc == '0, "accumulator cleared by reset");
    n_reset++;
    mac_rst = 1'b0;
    model = '0;
    for (int i = 0; i < VLEN; i++) begin
      mac_a = allones ? '1 : {$urandom, $urandom};
      mac_b = allones ? '1 : {$urandom, $urandom};
      prod  = 128'(mac_a) * 128'(mac_b);
      compressors();
      @(posedge clk); #1;
      if (130'(model) + 130'(prod) >= (130'(1) << 129)) n_wrap++;
      model = model + 129'(prod);
      n_accum++;
      check(mac_acc == model, $sformatf("running sum after element %0d", i));
    end
    check(mac_acc == model, "inner product complete one cycle after the last pair");
    n_dot++;
  endtask

  initial begin
    mac_rst = 1'b1;
    mac_a = '0;
    mac_b = '0;
    compressors();
    for (int t = 0; t < 20; t++) inner_product(t == 3);

    check(n_reset > 0, "reset happened");
    check(n_accum > 0, "accumulation happened");
    check(n_wrap  > 0, "accumulator wrap happened");
    check(n_dot   > 0, "inner product completed");
    check(n_cs9   > 0, "9:2 reduction happened");
    check(n_cs11  > 0, "11:2 reduction happened");
    check(n_c15   > 0, "15:4 count happened");
    check(n_c42   > 0, "4:2 compression happened");
    $display("resets=%0d accumulations=%0d wraps=%0d inner_products=%0d", n_reset, n_accum, n_wrap, n_dot);
    $display("cs9=%0d cs11=%0d c15=%0d c42=%0d", n_cs9, n_cs11, n_c15, n_c42);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
