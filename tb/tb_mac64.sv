// tb_mac64 -- clocked check of the 64-bit MAC unit.
// A reference accumulator in the testbench adds a*b (as a 129-bit number)
// on every rising edge; acc must match it one cycle after the operands are
// applied (latency 1, one MAC per cycle). Covered: reset, long random runs,
// all-ones operands until the 129-bit accumulator wraps, and a mid-run reset.
module tb_mac64;
  logic          clk = 1'b0, rst;
  logic [63:0]   a, b;
  logic [128:0]  acc, model;
  int checks = 0, failures = 0, wraps = 0;

  mac64 dut (.clk(clk), .rst(rst), .a(a), .b(b), .acc(acc));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] prod;
    rst = 1'b1;
    a = '1;
    b = '1;
    @(posedge clk); #1;
    checks++;
    if (acc != '0) begin failures++; $display("FAIL reset: acc=%h", acc); end
    rst = 1'b0;
    model = '0;
    for (int n = 0; n < 2000; n++) begin
      if (n < 5) begin a = '1; b = '1; end
      else begin a = {$urandom, $urandom}; b = {$urandom, $urandom}; end
      rst = (n == 1000);
      prod = 128'(a) * 128'(b);
      // before the edge the new product must not yet be in acc
      checks++;
      if (acc != model) begin failures++; $display("FAIL early change at %0d", n); end
      @(posedge clk); #1;
      if (rst) model = '0;
      else begin
        if (130'(model) + 130'(prod) >= (130'(1) << 129)) wraps++;
        model = model + 129'(prod);
      end
      checks++;
      if (acc != model) begin
        failures++;
        $display("FAIL cycle %0d: acc=%h expected %h", n, acc, model);
      end
    end
    checks++;
    if (wraps == 0) begin failures++; $display("FAIL no wrap-around exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
