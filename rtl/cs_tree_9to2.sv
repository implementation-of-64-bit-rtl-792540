// cs_tree_9to2 -- carry-save 9:2 compressor tree for N-bit operands.
//
// Reduces nine N-bit unsigned operands in[0..8] to two words whose sum is the
// sum of the operands: sum_o + carry_o = in[0] + ... + in[8]. A final
// carry-propagate adder (outside this block) turns the pair into one number.
//
// Seven carry-save 3:2 rows (csa_row) are connected as a linear array in
// which each row's carry word is the third input of the next row:
//   level 0: R0 = I2+I1+I0        -> S0, C0
//            R1 = I4+I3+2*C0      -> S1, C1
//            R2 = I6+I5+2*C1      -> S2, C2
//            R3 = I8+I7+2*C2      -> S3, C3
//   level 1: R4 = S1+S0+2*C3      -> S4, C4
//            R5 = S3+S2+2*C4      -> S5, C5
//   level 2: R6 = S5+S4+2*C5      -> Sf, Cf
// sum_o = Sf and carry_o = 2*Cf. The rows work on W = N+4 bits, enough for
// the sum of nine N-bit numbers, so no carry is lost. The row order and the
// carry links are those of the linear-array drawings of this tree; the word
// width W is this design's choice. Purely combinational, no clock.
module cs_tree_9to2 #(
  parameter int unsigned N = 16,
  localparam int unsigned W = N + 4
) (
  input  logic [N-1:0] in [9],
  output logic [W-1:0] sum_o,
  output logic [W-1:0] carry_o
);
  logic [W-1:0] x [9];
  logic [W-1:0] s [7];
  logic [W-1:0] c [7];

  for (genvar k = 0; k < 9; k++) begin : g_ext
    assign x[k] = W'(in[k]);
  end

  // level 0
  csa_row #(.W(W)) r0 (.a(x[2]), .b(x[1]), .ci(x[0]),          .s(s[0]), .co(c[0]));
  csa_row #(.W(W)) r1 (.a(x[4]), .b(x[3]), .ci({c[0][W-2:0], 1'b0}), .s(s[1]), .co(c[1]));
  csa_row #(.W(W)) r2 (.a(x[6]), .b(x[5]), .ci({c[1][W-2:0], 1'b0}), .s(s[2]), .co(c[2]));
  csa_row #(.W(W)) r3 (.a(x[8]), .b(x[7]), .ci({c[2][W-2:0], 1'b0}), .s(s[3]), .co(c[3]));
  // level 1
  csa_row #(.W(W)) r4 (.a(s[1]), .b(s[0]), .ci({c[3][W-2:0], 1'b0}), .s(s[4]), .co(c[4]));
  csa_row #(.W(W)) r5 (.a(s[3]), .b(s[2]), .ci({c[4][W-2:0], 1'b0}), .s(s[5]), .co(c[5]));
  // level 2
  csa_row #(.W(W)) r6 (.a(s[5]), .b(s[4]), .ci({c[5][W-2:0], 1'b0}), .s(s[6]), .co(c[6]));

  assign sum_o   = s[6];
  assign carry_o = {c[6][W-2:0], 1'b0};
endmodule
