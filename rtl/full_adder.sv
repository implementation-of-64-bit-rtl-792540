// full_adder -- one-bit 3:2 counter.
//
// Adds three bits of equal weight and returns a sum bit of the same weight
// and a carry bit of twice the weight: a + b + cin = sum + 2*cout.
// The gate structure follows the synthesized full-adder cell of the
// compressor schematics: three two-input ANDs feeding a three-input OR for
// the carry, and a three-input XOR for the sum. Purely combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);
  assign sum  = a ^ b ^ cin;
  assign cout = (a & b) | (a & cin) | (b & cin);
endmodule
