// mult32_quad -- 32 x 32 unsigned multiplier built from four 16 x 16
// modified Wallace tree multipliers.
//
// p = a * b, purely combinational. The operands are split into 16-bit
// halves; the four sub-products (low*low, high*low, low*high, high*high)
// come from wallace_mult instances and are joined by the three adders of
// quad_combine. This is the 32 x 32 multiplier used four times in the 64-bit
// MAC; the decomposition follows its block diagram.
module mult32_quad (
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [63:0] p
);
  logic [31:0] q0, q1, q2, q3;

  wallace_mult #(.N(16)) mw0 (.a(a[15:0]),  .b(b[15:0]),  .p(q0));
  wallace_mult #(.N(16)) mw1 (.a(a[31:16]), .b(b[15:0]),  .p(q1));
  wallace_mult #(.N(16)) mw2 (.a(a[15:0]),  .b(b[31:16]), .p(q2));
  wallace_mult #(.N(16)) mw3 (.a(a[31:16]), .b(b[31:16]), .p(q3));

  quad_combine #(.N(32)) comb (.q0(q0), .q1(q1), .q2(q2), .q3(q3), .p(p));
endmodule
