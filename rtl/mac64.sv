// mac64 -- 64-bit multiply-accumulate unit.
//
// Each clock cycle the unsigned 64-bit operands a and b are multiplied
// (mult64_quad, 128-bit product) and the product is added to the 129-bit
// accumulator (mac_accumulator). acc is the accumulator register: the
// product of operands held during cycle k is included in acc after the
// rising edge that ends cycle k, so acc = sum of all products since the last
// reset, modulo 2^129. rst (synchronous, active high) clears it. There is no
// pipeline inside the multiplier: one MAC per cycle, latency one cycle.
// Widths follow the MAC architecture (64-bit inputs, 128-bit product,
// 129-bit adder and accumulator); unsigned operands and the clock-by-clock
// accumulation without an enable are this design's choices.
module mac64 (
  input  logic         clk,
  input  logic         rst,
  input  logic [63:0]  a,
  input  logic [63:0]  b,
  output logic [128:0] acc
);
  logic [127:0] prod;

  mult64_quad mult (.a(a), .b(b), .p(prod));
  mac_accumulator #(.PW(128), .AW(129)) accu (.clk(clk), .rst(rst), .prod(prod), .acc(acc));
endmodule
