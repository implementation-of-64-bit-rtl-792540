// parallel_adder4 -- 4-bit carry-propagate (ripple) adder.
//
// {carry, sum} = a + b + cin, built from four full adders in a ripple chain.
// It is the final adder of the 15:4 compressor. Purely combinational.
module parallel_adder4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic       cin,
  output logic [3:0] sum,
  output logic       carry
);
  logic [4:0] c;

  assign c[0] = cin;
  for (genvar i = 0; i < 4; i++) begin : g_bit
    full_adder fa (.a(a[i]), .b(b[i]), .cin(c[i]), .sum(sum[i]), .cout(c[i+1]));
  end
  assign carry = c[4];
endmodule
