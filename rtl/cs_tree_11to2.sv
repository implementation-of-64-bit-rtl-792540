// cs_tree_11to2 -- carry-save 11:2 compressor tree of 5:3 compressor rows.
//
// Reduces eleven N-bit unsigned operands to two words with
// sum_o + carry_o = in[0] + ... + in[10]. Five W-bit rows of 5:3 compressors
// (c53_row) are used, as in the drawings of this tree (comp1..comp5):
//   comp1: I0 + I1 + I2 + I3 + I4                 -> S1, A1, B1
//   comp2: I5 + I6 + I7 + 2*A1 + 4*B1             -> S2, A2, B2
//   comp4: I8 + I9 + I10 + 2*A2 + 4*B2            -> S3, A3, B3
//   comp3: S1 + S2 + S3 + 2*A3 + 4*B3             -> S4, A4, B4
//   comp5: S4 + 2*A4 + 4*B4 + 0 + 0               -> Sf, Cf, 0
// sum_o = Sf and carry_o = 2*Cf. comp5 counts at most three ones per bit, so
// its weight-4 output is always 0 and is left unused. The eleven inputs enter
// comp1 (five), comp2 (three) and comp4 (three), and comp5 has two inputs tied
// to 0, as drawn; which internal word reaches which compressor port is this
// design's reading of the drawing. W = N+4 bits, enough for the sum of eleven
// N-bit numbers. Purely combinational, no clock.
module cs_tree_11to2 #(
  parameter int unsigned N = 16,
  localparam int unsigned W = N + 4
) (
  input  logic [N-1:0] in [11],
  output logic [W-1:0] sum_o,
  output logic [W-1:0] carry_o
);
  logic [W-1:0] x [11];
  logic [W-1:0] s [5];
  logic [W-1:0] ca [5];
  logic [W-1:0] cb [5];

  for (genvar k = 0; k < 11; k++) begin : g_ext
    assign x[k] = W'(in[k]);
  end

  c53_row #(.W(W)) comp1 (.a(x[0]), .b(x[1]), .c(x[2]), .d(x[3]), .e(x[4]),
                          .s(s[0]), .ca(ca[0]), .cb(cb[0]));
  c53_row #(.W(W)) comp2 (.a(x[5]), .b(x[6]), .c(x[7]),
                          .d({ca[0][W-2:0], 1'b0}), .e({cb[0][W-3:0], 2'b00}),
                          .s(s[1]), .ca(ca[1]), .cb(cb[1]));
  c53_row #(.W(W)) comp4 (.a(x[8]), .b(x[9]), .c(x[10]),
                          .d({ca[1][W-2:0], 1'b0}), .e({cb[1][W-3:0], 2'b00}),
                          .s(s[2]), .ca(ca[2]), .cb(cb[2]));
  c53_row #(.W(W)) comp3 (.a(s[0]), .b(s[1]), .c(s[2]),
                          .d({ca[2][W-2:0], 1'b0}), .e({cb[2][W-3:0], 2'b00}),
                          .s(s[3]), .ca(ca[3]), .cb(cb[3]));
  c53_row #(.W(W)) comp5 (.a(s[3]), .b({ca[3][W-2:0], 1'b0}), .c({cb[3][W-3:0], 2'b00}),
                          .d('0), .e('0),
                          .s(s[4]), .ca(ca[4]), .cb(cb[4]));

  assign sum_o   = s[4];
  assign carry_o = {ca[4][W-2:0], 1'b0};
endmodule
