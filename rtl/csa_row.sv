// csa_row -- W-bit carry-save 3:2 row.
//
// A row of W full adders, one per bit, with no carry chain between them:
// bit i adds a[i], b[i] and ci[i] and gives s[i] and co[i]. As words,
//     a + b + ci = s + 2*co.
// co is returned unshifted (co[i] has weight 2^(i+1)); the user shifts it
// left by one when feeding it to the next row, which is how the carry words
// travel between the rows of the linear-array compressor trees. The top
// carry bit co[W-1] falls outside a W-bit word once shifted; the trees size W
// so that it is always 0. Purely combinational.
module csa_row #(
  parameter int unsigned W = 20
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] ci,
  output logic [W-1:0] s,
  output logic [W-1:0] co
);
  for (genvar i = 0; i < W; i++) begin : g_fa
    full_adder fa (.a(a[i]), .b(b[i]), .cin(ci[i]), .sum(s[i]), .cout(co[i]));
  end
endmodule
