// counter_15to4 -- 15:4 compressor: counts fifteen bits of equal weight.
//
// o = number of ones in x[14:0], a four-bit result (0..15).
// Stage 1: five full adders each take three inputs (x[2:0], x[5:3], ...,
// x[14:12]) and give a sum (weight 1) and a carry (weight 2).
// Stage 2: one 5:3 compressor counts the five carries into A3 A2 A1 (weights
// 8, 4, 2; A0 is tied to 0); another counts the five sums into B2 B1 B0
// (weights 4, 2, 1; B3 is tied to 0).
// Stage 3: a 4-bit parallel adder forms O = A + B with carry-in 0. The sum
// never exceeds 15, so its carry-out is always 0 and is left unused.
// Purely combinational.
module counter_15to4 (
  input  logic [14:0] x,
  output logic [3:0]  o
);
  logic [4:0] fs, fc;     // full-adder sums and carries
  logic [3:0] a_op, b_op; // operands of the final adder
  logic       co_unused;

  for (genvar i = 0; i < 5; i++) begin : g_fa
    full_adder fa (.a(x[3*i+2]), .b(x[3*i+1]), .cin(x[3*i]),
                   .sum(fs[i]), .cout(fc[i]));
  end

  counter_5to3 comp_a (.a(fc[0]), .b(fc[1]), .c(fc[2]), .d(fc[3]), .e(fc[4]),
                       .s0(a_op[1]), .s1(a_op[2]), .s2(a_op[3]));
  counter_5to3 comp_b (.a(fs[0]), .b(fs[1]), .c(fs[2]), .d(fs[3]), .e(fs[4]),
                       .s0(b_op[0]), .s1(b_op[1]), .s2(b_op[2]));
  assign a_op[0] = 1'b0;
  assign b_op[3] = 1'b0;

  parallel_adder4 par1 (.a(a_op), .b(b_op), .cin(1'b0), .sum(o), .carry(co_unused));
endmodule
