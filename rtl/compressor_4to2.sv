// compressor_4to2 -- multiplexer-based 4:2 compressor.
//
// Takes four bits x1..x4 of one weight plus a carry-in cin from the
// neighbouring lower-weight compressor and returns sum (same weight) and two
// outputs of twice the weight, carry and cout:
//     x1 + x2 + x3 + x4 + cin = sum + 2*(carry + cout).
// cout does not depend on cin, so a row of these cells has no rippling carry:
// cout of bit i feeds cin of bit i+1.
//
// Structure as drawn for this cell: two XOR/XNOR stages form x1^x2 and
// x3^x4; a multiplexer selected by x1^x2 picks cout from x3 or x1; the
// combined parity (x1^x2^x3^x4, the MUX-TG stage) selects the sum between
// cin and its complement and the carry between x4 and cin. The mux data
// assignment is the standard one for this cell; the drawing gives the blocks
// and which signals reach them. Purely combinational.
module compressor_4to2 (
  input  logic x1,
  input  logic x2,
  input  logic x3,
  input  logic x4,
  input  logic cin,
  output logic sum,
  output logic carry,
  output logic cout
);
  logic x12, x34, p;

  assign x12   = x1 ^ x2;             // first XOR/XNOR stage
  assign x34   = x3 ^ x4;             // second XOR/XNOR stage
  assign p     = x12 ^ x34;           // MUX-TG: parity of x1..x4
  assign cout  = x12 ? x3  : x1;      // MUX -> COUT
  assign sum   = p   ? ~cin : cin;    // MUX -> SUM
  assign carry = p   ? cin : x4;      // MUX -> CARRY
endmodule
