// counter_5to3 -- 5:3 compressor: counts five bits of equal weight.
//
// {s2, s1, s0} = a + b + c + d + e, a three-bit binary count (0..5).
// Built, like the synthesized cell, around two full adders: fa1 adds a, b, c;
// fa2 adds fa1's sum to d and e and yields the weight-1 output. The two
// weight-2 carries c1 and c2 of fa1 and fa2 are then merged into the binary
// pair s1 = c1 ^ c2 (weight 2) and s2 = c1 & c2 (weight 4), since
// 2*(c1 + c2) = 2*s1 + 4*s2. Purely combinational.
module counter_5to3 (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  input  logic e,
  output logic s0,
  output logic s1,
  output logic s2
);
  logic sum1, c1, c2;

  full_adder fa1 (.a(a),    .b(b), .cin(c), .sum(sum1), .cout(c1));
  full_adder fa2 (.a(sum1), .b(d), .cin(e), .sum(s0),   .cout(c2));

  assign s1 = c1 ^ c2;
  assign s2 = c1 & c2;
endmodule
