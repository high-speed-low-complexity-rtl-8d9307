// qmf_mult_block: the multiplier block of one 1-D prototype QMF filter.
//
// It forms x times the magnitude of every tap coefficient with no
// multipliers: the two common subexpressions x5 = x + (x >> 2) and
// x3 = x - (x >> 2) are built once for the whole filter (cse_subexpr) and
// shared by every coefficient, and each distinct coefficient magnitude gets
// one coefficient-partitioned adder network (cp_coef_mult). Taps whose
// coefficients have equal magnitude, such as the two halves of the
// linear-phase prototype, read the same product; the coefficient sign is
// applied later by the structural adders of the filter.
//
// Coefficients are the TAPS-long prototype of qmf_pkg (50, 80, 120 or 250
// taps) rounded to CW fractional bits.
// p[n] = x * |C_n| exactly, with the real product p[n] / 2**CW.
// Combinational.
module qmf_mult_block
  import qmf_pkg::*;
#(
  parameter int XW   = 17,
  parameter int TAPS = PROTO_TAPS,
  parameter int CW   = 16,
  localparam int PW  = XW + CW    // |C_n| < 2**CW
) (
  input  logic signed [XW-1:0] x,
  output logic signed [PW-1:0] p [TAPS]
);

  if (!proto_supported(TAPS)) begin : g_bad_taps
    $error("qmf_mult_block: no prototype filter of %0d taps", TAPS);
  end

  logic signed [XW+2:0] x5;
  logic signed [XW+2:0] x3;

  cse_subexpr #(.XW(XW)) u_cse (.x(x), .x5(x5), .x3(x3));

  for (genvar n = 0; n < TAPS; n++) begin : g_tap
    localparam int FIRST = proto_first(TAPS, n, CW);
    if (FIRST == n) begin : g_own
      cp_coef_mult #(.XW(XW), .COEF(proto_mag(TAPS, n, CW)), .YW(PW)) u_cp (
        .x1(x), .x5(x5), .x3(x3), .y(p[n])
      );
    end else begin : g_shared
      assign p[n] = p[FIRST];
    end
  end

endmodule
