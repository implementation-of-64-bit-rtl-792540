// quad_combine -- joins four half-width products into one full product.
//
// An N x N product is split into four (N/2) x (N/2) products of the operand
// halves aL, aH, bL, bH (H = N/2):
//     q0 = aL*bL,  q1 = aH*bL,  q2 = aL*bH,  q3 = aH*bH,
//     a*b = q3*2^N + (q1 + q2)*2^H + q0.
// Three adders form it:
//     adder 1:  t1 = {q3, H zeros} + q2                     (3H bits)
//     adder 2:  t2 = q1 + q0[N-1:H]                         (N bits, no carry out)
//     adder 3:  p[2N-1:H] = t1 + t2,    p[H-1:0] = q0[H-1:0]
// None of the sums can overflow its width for any inputs. This is the adder
// arrangement of the divide-by-four multiplier block diagram; purely
// combinational. N must be even.
module quad_combine #(
  parameter int unsigned N = 32,
  localparam int unsigned H = N / 2
) (
  input  logic [N-1:0]   q0,
  input  logic [N-1:0]   q1,
  input  logic [N-1:0]   q2,
  input  logic [N-1:0]   q3,
  output logic [2*N-1:0] p
);
  logic [3*H-1:0] t1;
  logic [N-1:0]   t2;

  assign t1 = {q3, H'(0)} + (3*H)'(q2);           // adder 1
  assign t2 = q1 + N'(q0[N-1:H]);                 // adder 2
  assign p  = {t1 + (3*H)'(t2), q0[H-1:0]};       // adder 3
endmodule
