// shift_add: one adder of a shift-and-add multiplier, y = (a << K) + b or
// y = (a << K) - b, computed with an adder no wider than the operands'
// overlap.
//
// The K least significant bits of the result do not depend on a, so they are
// taken straight from b (for an addition) or from the K-bit negation of b's
// low bits (for a subtraction, whose borrow then enters the upper adder).
// Only the upper part, max(WA, WB-K)+1 bits, goes through a carry chain:
// this is how a right shift of one operand relative to the other keeps the
// adder short. Purely combinational; the output width is qmf_pkg::sa_w().
module shift_add
  import qmf_pkg::*;
#(
  parameter int WA  = 16,
  parameter int WB  = 16,
  parameter int K   = 2,
  parameter bit SUB = 1'b0,
  localparam int WBX = (WB > K) ? WB : K + 1,   // b extended to keep a sign bit above K
  localparam int WH  = max2(WA, WBX - K) + 1,   // width of the carry chain
  localparam int WO  = WH + K
) (
  input  logic signed [WA-1:0] a,
  input  logic signed [WB-1:0] b,
  output logic signed [WO-1:0] y
);

  logic signed [WBX-1:0]   bx;
  logic signed [WBX-K-1:0] bh;
  logic signed [WH-1:0]    uh;

  assign bx = WBX'(b);
  assign bh = bx[WBX-1:K];

  if (K == 0) begin : g_k0
    assign uh = SUB ? (WH'(a) - WH'(bh)) : (WH'(a) + WH'(bh));
    assign y  = uh;
  end else begin : g_k
    logic [K-1:0] bl;
    assign bl = bx[K-1:0];
    if (SUB) begin : g_sub
      // -(bh*2^K + bl) = (-bh - [bl != 0]) * 2^K + ((-bl) mod 2^K)
      assign uh = WH'(a) - WH'(bh) - WH'({1'b0, (bl != '0)});
      assign y  = {uh, K'(-bl)};
    end else begin : g_add
      assign uh = WH'(a) + WH'(bh);
      assign y  = {uh, bl};
    end
  end

endmodule
