// qmf_bank_1d: a two-channel QMF analysis bank for one dimension, built
// without multipliers.
//
// The low-pass filter H0 is the prototype of qmf_pkg (TAPS taps, CW-bit
// coefficients) and the high-pass filter is its mirror H1(z) = H0(-z),
// h1[n] = (-1)^n h0[n]. Both filters are in transposed direct form and take
// their products from one shared multiplier block (qmf_mult_block), so each
// filter adds only its structural adders: z_k <= +/-p[k] + z_{k+1}, output
// +/-p[0] + z_1.
//
// Each delay element of the transposed form is D samples long rather than
// one. With D = 1 the bank filters consecutive samples (a row of pixels);
// with D = the line length it filters down the columns of an interleaved
// raster stream, which is how the 2-D bank is formed from 1-D banks. The
// delays live in D-word circular buffers with one shared pointer.
// Outputs are decimated by two: a sample is kept when the number of
// completed D-sample groups is even (every other sample when D = 1, every
// other line otherwise).
//
// Timing: x is captured when in_valid && in_ready; the products are formed
// from the captured sample and the delay lines update one cycle later; lp/hp
// appear with out_valid two cycles after the accepted input (for kept
// samples). One sample per cycle may be accepted. After reset the delay
// buffers are cleared, one address per cycle, and in_ready stays low for D
// cycles. lp and hp are full precision: the real values are lp / 2**CW.
// The delay-line length, decimation phase, clearing and handshake are this
// design's choices.
module qmf_bank_1d
  import qmf_pkg::*;
#(
  parameter int XW   = 17,
  parameter int TAPS = PROTO_TAPS,
  parameter int CW   = 16,
  parameter int D    = 1,
  localparam int AW  = XW + proto_growth(TAPS, CW) + 1,
  localparam int PW  = XW + CW,
  localparam int DA  = (D > 1) ? $clog2(D) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic signed [XW-1:0] x,
  output logic                 out_valid,
  output logic signed [AW-1:0] lp,
  output logic signed [AW-1:0] hp
);

  // ---------------------------------------------------------------- control
  logic                 clr_active;
  logic [DA-1:0]        clr_addr;
  logic [DA-1:0]        ptr;
  logic                 parity;      // odd number of completed groups
  logic                 x_vld;
  logic signed [XW-1:0] x_r;

  assign in_ready = !clr_active;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      clr_active <= 1'b1;
      clr_addr   <= '0;
      ptr        <= '0;
      parity     <= 1'b0;
      x_vld      <= 1'b0;
      x_r        <= '0;
    end else begin
      if (clr_active) begin
        if (int'(clr_addr) == D - 1) clr_active <= 1'b0;
        else                         clr_addr   <= clr_addr + 1'b1;
      end
      x_vld <= in_valid && in_ready;
      if (in_valid && in_ready) x_r <= x;
      if (x_vld) begin
        if (int'(ptr) == D - 1) begin
          ptr    <= '0;
          parity <= !parity;
        end else begin
          ptr <= ptr + 1'b1;
        end
      end
    end
  end

  // ------------------------------------------------------- multiplier block
  logic signed [PW-1:0] p [TAPS];

  qmf_mult_block #(.XW(XW), .TAPS(TAPS), .CW(CW)) u_mb (.x(x_r), .p(p));

  // Sign of tap n in each filter.
  function automatic bit neg_lp(input int n);
    return proto_coef(TAPS, n, CW) < 0;
  endfunction
  function automatic bit neg_hp(input int n);
    return (proto_coef(TAPS, n, CW) < 0) ^ (n % 2 == 1);
  endfunction

  // ------------------------------------------------- structural adders/delay
  logic signed [AW-1:0] zl_mem [1:TAPS-1][D];
  logic signed [AW-1:0] zh_mem [1:TAPS-1][D];
  logic signed [AW-1:0] zl_rd  [1:TAPS];      // z_k read at ptr; z_TAPS = 0
  logic signed [AW-1:0] zh_rd  [1:TAPS];
  logic signed [AW-1:0] zl_nx  [0:TAPS-1];    // new z_k; index 0 is the output
  logic signed [AW-1:0] zh_nx  [0:TAPS-1];

  always_comb begin
    for (int k = 1; k < TAPS; k++) begin
      zl_rd[k] = zl_mem[k][ptr];
      zh_rd[k] = zh_mem[k][ptr];
    end
    zl_rd[TAPS] = '0;
    zh_rd[TAPS] = '0;
    for (int k = 0; k < TAPS; k++) begin
      zl_nx[k] = neg_lp(k) ? (zl_rd[k+1] - AW'(p[k])) : (zl_rd[k+1] + AW'(p[k]));
      zh_nx[k] = neg_hp(k) ? (zh_rd[k+1] - AW'(p[k])) : (zh_rd[k+1] + AW'(p[k]));
    end
  end

  // Delay buffers: no reset, cleared by the sweep after reset.
  always_ff @(posedge clk) begin
    if (clr_active) begin
      for (int k = 1; k < TAPS; k++) begin
        zl_mem[k][clr_addr] <= '0;
        zh_mem[k][clr_addr] <= '0;
      end
    end else if (x_vld) begin
      for (int k = 1; k < TAPS; k++) begin
        zl_mem[k][ptr] <= zl_nx[k];
        zh_mem[k][ptr] <= zh_nx[k];
      end
    end
  end

  // --------------------------------------------------------- decimated output
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      lp        <= '0;
      hp        <= '0;
    end else begin
      out_valid <= x_vld && !parity;
      if (x_vld && !parity) begin
        lp <= zl_nx[0];
        hp <= zh_nx[0];
      end
    end
  end

endmodule
