// mac_accumulator -- accumulate adder and accumulator register of the MAC.
//
// On every rising clock edge acc takes acc + prod, the product widened to
// AW bits; the sum wraps modulo 2^AW. A synchronous, active-high rst clears
// acc to 0 instead. acc is both the MAC output and the adder's second input.
// Default widths are those of the MAC: a 128-bit product into a 129-bit
// adder and accumulator. Accumulating on every cycle, the synchronous reset
// and the wrap-around on overflow are this design's choices.
module mac_accumulator #(
  parameter int unsigned PW = 128,
  parameter int unsigned AW = 129
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [PW-1:0] prod,
  output logic [AW-1:0] acc
);
  logic [AW-1:0] sum;

  assign sum = acc + AW'(prod);

  always_ff @(posedge clk) begin
    if (rst) acc <= '0;
    else     acc <= sum;
  end
endmodule
