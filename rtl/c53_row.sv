// c53_row -- W-bit row of 5:3 compressors.
//
// Bit i counts a[i], b[i], c[i], d[i], e[i] into s[i] (weight 2^i), ca[i]
// (weight 2^(i+1)) and cb[i] (weight 2^(i+2)), so as words
//     a + b + c + d + e = s + 2*ca + 4*cb.
// ca and cb come back unshifted; the 11:2 tree shifts them by one and two
// bits when it feeds them to the next row. Purely combinational.
module c53_row #(
  parameter int unsigned W = 20
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  input  logic [W-1:0] d,
  input  logic [W-1:0] e,
  output logic [W-1:0] s,
  output logic [W-1:0] ca,
  output logic [W-1:0] cb
);
  for (genvar i = 0; i < W; i++) begin : g_c53
    counter_5to3 cmp (.a(a[i]), .b(b[i]), .c(c[i]), .d(d[i]), .e(e[i]),
                      .s0(s[i]), .s1(ca[i]), .s2(cb[i]));
  end
endmodule
