// cse_subexpr: the two common subexpressions shared by every coefficient
// multiplier of a filter: x5 = x + (x >> 2) and x3 = x - (x >> 2), the
// products by the CSD digit patterns [1 0 1] and [1 0 -1].
//
// In integer form (weights in units of the lowest input bit) they are
// x5 = 4x + x = 5x and x3 = 4x - x = 3x. Each is one adder of XW+1 bits
// (one shift_add with K = 2). Combinational; outputs are XW+3 bits signed.
module cse_subexpr
  import qmf_pkg::*;
#(
  parameter int XW = 16
) (
  input  logic signed [XW-1:0] x,
  output logic signed [XW+2:0] x5,
  output logic signed [XW+2:0] x3
);

  shift_add #(.WA(XW), .WB(XW), .K(2), .SUB(1'b0)) u_x5 (.a(x), .b(x), .y(x5));
  shift_add #(.WA(XW), .WB(XW), .K(2), .SUB(1'b1)) u_x3 (.a(x), .b(x), .y(x3));

endmodule
