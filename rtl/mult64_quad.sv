// mult64_quad -- 64 x 64 unsigned multiplier of the MAC unit.
//
// p = a * b (128 bits), purely combinational. Four 32 x 32 multipliers
// (mult32_quad, each itself four 16 x 16 modified Wallace trees) form the
// products of the 32-bit operand halves, and the three adders of
// quad_combine join them: {q3, 32'b0} + q2, q1 + q0[63:32], and the sum of
// those two, with q0[31:0] as the low word. The four 32 x 32 blocks and three
// adders are those of the MAC schematic.
module mult64_quad (
  input  logic [63:0]  a,
  input  logic [63:0]  b,
  output logic [127:0] p
);
  logic [63:0] q0, q1, q2, q3;

  mult32_quad mw321 (.a(a[31:0]),  .b(b[31:0]),  .p(q0));
  mult32_quad mw322 (.a(a[63:32]), .b(b[31:0]),  .p(q1));
  mult32_quad mw323 (.a(a[31:0]),  .b(b[63:32]), .p(q2));
  mult32_quad mw324 (.a(a[63:32]), .b(b[63:32]), .p(q3));

  quad_combine #(.N(64)) comb (.q0(q0), .q1(q1), .q2(q2), .q3(q3), .p(p));
endmodule
