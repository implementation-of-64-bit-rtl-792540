// tb_mac_accumulator -- clocked check of the 129-bit accumulator: after
// reset acc is 0; then each rising edge adds the product input, wrapping
// modulo 2^129 (driven with all-ones products until it wraps); a reset in
// the middle clears it again.
module tb_mac_accumulator;
  logic          clk = 1'b0, rst;
  logic [127:0]  prod;
  logic [128:0]  acc, model;
  int checks = 0, failures = 0, wraps = 0;

  mac_accumulator dut (.clk(clk), .rst(rst), .prod(prod), .acc(acc));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1;
    prod = '1;
    @(posedge clk); #1;
    checks++;
    if (acc != '0) begin failures++; $display("FAIL reset: acc=%h", acc); end
    rst = 1'b0;
    model = '0;
    for (int n = 0; n < 1000; n++) begin
      if (n < 6)        prod = '1;
      else if (n % 3)   prod = {$urandom, $urandom, $urandom, $urandom};
      else              prod = 128'($urandom);
      rst = (n == 500);
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
