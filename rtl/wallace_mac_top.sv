// wallace_mac_top -- 64-bit modified Wallace MAC with its multi-operand
// compressor units.
//
// Two independent parts stand side by side, each with its own ports:
//  * mac64: the clocked 64-bit multiply-accumulate unit (mac_a, mac_b in,
//    129-bit mac_acc out, one product accumulated per clock; mac_rst clears).
//  * The combinational carry-save multi-operand adders: the 9:2 linear-array
//    compressor tree (cs9_*), the 11:2 tree of 5:3 compressors (cs11_*), the
//    15:4 bit counter (c15_*) and the 4:2 compressor cell (c42_*). The trees
//    work on CS_N-bit operands and return a sum word and a carry word whose
//    sum is the sum of the operands.
// How the compressor units would be wired into the multiplier is not part of
// this design, so they are brought out on ports of their own.
module wallace_mac_top #(
  parameter int unsigned CS_N = 16,
  localparam int unsigned CS_W = CS_N + 4
) (
  input  logic            clk,
  input  logic            mac_rst,
  input  logic [63:0]     mac_a,
  input  logic [63:0]     mac_b,
  output logic [128:0]    mac_acc,

  input  logic [CS_N-1:0] cs9_in [9],
  output logic [CS_W-1:0] cs9_sum,
  output logic [CS_W-1:0] cs9_carry,

  input  logic [CS_N-1:0] cs11_in [11],
  output logic [CS_W-1:0] cs11_sum,
  output logic [CS_W-1:0] cs11_carry,

  input  logic [14:0]     c15_x,
  output logic [3:0]      c15_o,

  input  logic [3:0]      c42_x,
  input  logic            c42_cin,
  output logic            c42_sum,
  output logic            c42_carry,
  output logic            c42_cout
);
  mac64 mac (.clk(clk), .rst(mac_rst), .a(mac_a), .b(mac_b), .acc(mac_acc));

  cs_tree_9to2  #(.N(CS_N)) cs9  (.in(cs9_in),  .sum_o(cs9_sum),  .carry_o(cs9_carry));
  cs_tree_11to2 #(.N(CS_N)) cs11 (.in(cs11_in), .sum_o(cs11_sum), .carry_o(cs11_carry));

  counter_15to4 c15 (.x(c15_x), .o(c15_o));

  compressor_4to2 c42 (.x1(c42_x[0]), .x2(c42_x[1]), .x3(c42_x[2]), .x4(c42_x[3]),
                       .cin(c42_cin), .sum(c42_sum), .carry(c42_carry), .cout(c42_cout));
endmodule
