// cp_coef_mult: multiplierless product y = x * COEF built by coefficient
// partitioning (CP) on top of horizontal common subexpression elimination.
//
// How it works, all at elaboration time from the COEF parameter:
//  1. COEF is recoded in CSD and every [1 0 1] / [1 0 -1] digit pair (or its
//     negation) becomes one term of x5 or x3, supplied by cse_subexpr.
//  2. The remaining terms, ordered from the most significant one, form the
//     pseudo floating-point (PFP) form: a common shift (the position of the
//     last term) times a span part.
//  3. The span part is cut in two: the MSB half holds the first floor(n/2)
//     terms and the LSB half the rest. Each half is summed on its own,
//     relative to its own least significant term, so its adders see only the
//     short range of that half (the LSB half is "scaled by its order").
//  4. One last adder joins the halves with the LSB half shifted right by the
//     distance between them; the common shift is then applied as wiring.
// For the example coefficient 0.0101001010000101 (the default) this gives
// the three adders A1 (x5, in cse_subexpr), A2 = x5 + (x5 >> 7) and
// A3 = x5 + (A2 >> 5), output shifted by 2, three adder steps deep.
//
// Interface: x1, x5, x3 are the input and its shared subexpressions; y is
// x1 * COEF, exact, sign extended (or wrapped) to YW bits. Combinational.
// The split rule of step 3 (by term count) is this design's choice, made so
// the worked example of the method keeps its two halves.
module cp_coef_mult
  import qmf_pkg::*;
#(
  parameter int     XW   = 16,
  parameter longint COEF = 64'sd21125,   // 0.0101001010000101 at 16 fraction bits
  parameter int     YW   = 34
) (
  input  logic signed [XW-1:0] x1,
  input  logic signed [XW+2:0] x5,
  input  logic signed [XW+2:0] x3,
  output logic signed [YW-1:0] y
);

  localparam terms_t TL = hcse_terms(COEF);
  localparam int     NT = int'(TL.n);
  localparam int     NM = msb_terms(TL);
  // Full adders used by this coefficient (cse_subexpr adders not included).
  localparam int     FULL_ADDERS = fa_count(TL, XW);

  if (NT == 0) begin : g_zero
    assign y = '0;
  end else begin : g_terms
    for (genvar j = 0; j < NT; j++) begin : g_t
      localparam int    BW  = base_w(base_e'(TL.t[j].base), XW);
      localparam int    AW  = chain_w(TL, XW, j);
      localparam bit    NEG = TL.t[j].neg;
      logic signed [BW-1:0] b;
      logic signed [AW-1:0] acc;

      if (base_e'(TL.t[j].base) == BASE_X1) begin : g_x1
        assign b = x1;
      end else if (base_e'(TL.t[j].base) == BASE_X5) begin : g_x5
        assign b = x5;
      end else begin : g_x3
        assign b = x3;
      end

      if (j == 0 || j == NM) begin : g_first
        // first term of a half: its value, negated if needed
        assign acc = NEG ? -AW'(b) : AW'(b);
      end else begin : g_add
        localparam int K  = int'(TL.t[j-1].pos) - int'(TL.t[j].pos);
        localparam int PW = chain_w(TL, XW, j - 1);
        shift_add #(.WA(PW), .WB(BW), .K(K), .SUB(NEG)) u_sa (
          .a(g_t[j-1].acc), .b(b), .y(acc)
        );
      end
    end

    localparam int LSB_POS = int'(TL.t[NT-1].pos);
    if (NM == 0) begin : g_single
      // one term: no adder, only the shift
      assign y = YW'(g_t[0].acc) <<< LSB_POS;
    end else begin : g_join
      localparam int KJ = int'(TL.t[NM-1].pos) - LSB_POS;
      localparam int WM = chain_w(TL, XW, NM - 1);
      localparam int WL = chain_w(TL, XW, NT - 1);
      localparam int WJ = sa_w(WM, WL, KJ);
      logic signed [WJ-1:0] joined;
      shift_add #(.WA(WM), .WB(WL), .K(KJ), .SUB(1'b0)) u_join (
        .a(g_t[NM-1].acc), .b(g_t[NT-1].acc), .y(joined)
      );
      assign y = YW'(joined) <<< LSB_POS;
    end
  end

endmodule
