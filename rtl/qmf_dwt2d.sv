// qmf_dwt2d: tree-structured 2-D QMF analysis (wavelet decomposition) of a
// raster pixel stream: LEVELS levels of qmf_2d, each fed with the LL band
// of the level above.
//
// Level 0 takes the image, IMG_W pixels per line. Its LL band is itself a
// raster stream of IMG_W/2 samples per line (one output line per two input
// lines), so level l is a qmf_2d with line length IMG_W >> l and signed
// input of the previous level's subband width. Every level emits its LH,
// HL and HH bands; the LL band of the last level is the coarse image. This
// is the octave band split obtained by recursively filtering the low band.
//
// Interface: pix/pix_valid/pix_ready as for qmf_2d. Per level l:
// det_valid[l] with lh[l], hl[l], hh[l], sign extended to the widest
// subband width OW. ll/ll_valid: the last level's LL band.
// Word growth per level is 2 * (ceil(log2(sum|C|)) + 1 - CW) + 1 bits (7
// with the defaults), so level widths are 23, 30, 37 bits for 16-bit pixels.
// Deeper levels clear their (shorter) line buffers sooner than level 0, so
// pix_ready only reflects level 0's clear; an assertion checks that no
// deeper level is ever offered a sample while clearing.
// The number of levels is this design's choice; timing per level is that
// of qmf_2d (4 cycles), so level l's outputs follow the completing pixel
// by 4*(l+1) cycles.
module qmf_dwt2d
  import qmf_pkg::*;
#(
  parameter int PIX_W  = 16,
  parameter int IMG_W  = 512,
  parameter int TAPS   = PROTO_TAPS,
  parameter int CW     = 16,
  parameter int LEVELS = 3,
  localparam int G     = 2 * (proto_growth(TAPS, CW) + 1 - CW) + 1,  // bits added per level
  localparam int OW    = PIX_W + LEVELS * G                          // widest subband
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 pix_valid,
  output logic                 pix_ready,
  input  logic [PIX_W-1:0]     pix,
  output logic [LEVELS-1:0]    det_valid,
  output logic signed [OW-1:0] lh [LEVELS],
  output logic signed [OW-1:0] hl [LEVELS],
  output logic signed [OW-1:0] hh [LEVELS],
  output logic                 ll_valid,
  output logic signed [OW-1:0] ll
);

  if (IMG_W % (1 << LEVELS) != 0) begin : g_bad_width
    $error("qmf_dwt2d: IMG_W must be a multiple of 2**LEVELS");
  end

  logic [LEVELS-1:0] lvl_ready;

  for (genvar l = 0; l < LEVELS; l++) begin : g_lvl
    localparam int IW = PIX_W + l * G;   // input width of this level
    localparam int LW = IW + G;          // subband width of this level
    logic                 in_valid;
    logic [IW-1:0]        in_pix;
    logic                 o_valid;
    logic signed [LW-1:0] o_ll, o_lh, o_hl, o_hh;

    if (l == 0) begin : g_src
      assign in_valid = pix_valid;
      assign in_pix   = pix;
    end else begin : g_chain
      assign in_valid = g_lvl[l-1].o_valid;
      assign in_pix   = g_lvl[l-1].o_ll;
    end

    qmf_2d #(.PIX_W(IW), .IMG_W(IMG_W >> l), .TAPS(TAPS), .CW(CW),
             .SIGNED_PIX(l > 0)) u_lvl (
      .clk, .rst_n,
      .pix_valid(in_valid),
      .pix_ready(lvl_ready[l]),
      .pix      (in_pix),
      .out_valid(o_valid),
      .ll       (o_ll),
      .lh       (o_lh),
      .hl       (o_hl),
      .hh       (o_hh)
    );

    assign det_valid[l] = o_valid;
    assign lh[l] = OW'(o_lh);
    assign hl[l] = OW'(o_hl);
    assign hh[l] = OW'(o_hh);

    if (l > 0) begin : g_chk
      a_no_drop: assert property (@(posedge clk) disable iff (!rst_n)
                                 in_valid |-> lvl_ready[l])
        else $error("level %0d offered a sample while clearing", l);
    end
  end

  assign pix_ready = lvl_ready[0];
  assign ll_valid  = g_lvl[LEVELS-1].o_valid;
  assign ll        = OW'(g_lvl[LEVELS-1].o_ll);

endmodule
