// half_adder -- one-bit 2:2 counter.
//
// a + b = sum + 2*cout. Used by the modified Wallace reduction only where a
// column would otherwise end a stage taller than the row count of the
// reduction schedule. Purely combinational.
module half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic cout
);
  assign sum  = a ^ b;
  assign cout = a & b;
endmodule
