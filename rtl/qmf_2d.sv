// qmf_2d: one level of the 2-D QMF (separable wavelet) analysis of a raster
// pixel stream, formed as a delayed sum of 1-D multiplierless QMF banks.
//
// A 2-D separable filter is sum_i h[i] * (row-filtered line m-i), so the
// column filter is an ordinary 1-D filter whose unit delay is one line.
// The row bank (delay 1) splits each line into low and high bands and
// decimates by two along the line, giving IMG_W/2 samples per band and line.
// Each band then enters a column bank whose delays are IMG_W/2 samples, i.e.
// one decimated line; it splits the band vertically and keeps every other
// line. The four outputs are
//   ll: row low,  column low      lh: row low,  column high
//   hl: row high, column low      hh: row high, column high
// and appear together, one sample of each per two input pixels of every
// other line.
//
// Word lengths: pixels are unsigned PIX_W bits (two's complement when
// SIGNED_PIX is set, as for the LL band of a previous level). After each
// 1-D stage the full-precision sum is truncated (floor) by the CW
// coefficient fraction bits, so the stage output is an integer at the input's scale; the
// remaining width covers the filter gain. Lines are filtered as one
// continuous stream (no border extension); the delay buffers start at zero
// after reset. The raster order, truncation and border handling are this
// design's choices.
//
// Interface: pix/pix_valid/pix_ready handshake (pix_ready is low only while
// the line buffers are cleared after reset, IMG_W/2 cycles), outputs with
// out_valid. Latency from an accepted pixel that completes a kept output to
// that output: 4 cycles.
module qmf_2d
  import qmf_pkg::*;
#(
  parameter int PIX_W = 16,
  parameter int IMG_W = 512,
  parameter int TAPS  = PROTO_TAPS,
  parameter int CW    = 16,
  parameter bit SIGNED_PIX = 1'b0,    // pix is two's complement (deeper tree levels)
  localparam int XW   = PIX_W + 1,
  localparam int RAW  = XW + proto_growth(TAPS, CW) + 1,   // row bank sum
  localparam int RW   = RAW - CW,                         // row band sample
  localparam int CAW  = RW + proto_growth(TAPS, CW) + 1,  // column bank sum
  localparam int OW   = CAW - CW                          // subband sample
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 pix_valid,
  output logic                 pix_ready,
  input  logic [PIX_W-1:0]     pix,
  output logic                 out_valid,
  output logic signed [OW-1:0] ll,
  output logic signed [OW-1:0] lh,
  output logic signed [OW-1:0] hl,
  output logic signed [OW-1:0] hh
);

  logic                  row_ready, col_l_ready, col_h_ready;
  logic                  row_valid;
  logic signed [RAW-1:0] row_lp, row_hp;
  logic signed [RW-1:0]  band_l, band_h;
  logic                  col_l_valid, col_h_valid;
  logic signed [CAW-1:0] ll_f, lh_f, hl_f, hh_f;

  assign pix_ready = row_ready && col_l_ready && col_h_ready;

  qmf_bank_1d #(.XW(XW), .TAPS(TAPS), .CW(CW), .D(1)) u_row (
    .clk, .rst_n,
    .in_valid (pix_valid && pix_ready),
    .in_ready (row_ready),
    .x        ($signed({SIGNED_PIX ? pix[PIX_W-1] : 1'b0, pix})),
    .out_valid(row_valid),
    .lp       (row_lp),
    .hp       (row_hp)
  );

  assign band_l = RW'(row_lp >>> CW);
  assign band_h = RW'(row_hp >>> CW);

  qmf_bank_1d #(.XW(RW), .TAPS(TAPS), .CW(CW), .D(IMG_W / 2)) u_col_l (
    .clk, .rst_n,
    .in_valid (row_valid),
    .in_ready (col_l_ready),
    .x        (band_l),
    .out_valid(col_l_valid),
    .lp       (ll_f),
    .hp       (lh_f)
  );

  qmf_bank_1d #(.XW(RW), .TAPS(TAPS), .CW(CW), .D(IMG_W / 2)) u_col_h (
    .clk, .rst_n,
    .in_valid (row_valid),
    .in_ready (col_h_ready),
    .x        (band_h),
    .out_valid(col_h_valid),
    .lp       (hl_f),
    .hp       (hh_f)
  );

  assign out_valid = col_l_valid;
  assign ll = OW'(ll_f >>> CW);
  assign lh = OW'(lh_f >>> CW);
  assign hl = OW'(hl_f >>> CW);
  assign hh = OW'(hh_f >>> CW);

  // Both column banks see the same valid stream, so they stay in step.
  a_cols_in_step: assert property (@(posedge clk) disable iff (!rst_n)
                                   col_l_valid == col_h_valid)
    else $error("column banks out of step");

endmodule
