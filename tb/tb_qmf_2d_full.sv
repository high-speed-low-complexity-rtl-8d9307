// tb_qmf_2d_full: the end-to-end test of tb_qmf_2d run on the 2-D QMF level
// with every parameter at its default (512-pixel lines, 50-tap prototype,
// 16-bit coefficients, 16-bit pixels): 104 lines, enough for the 50-tap
// column filters to run with their delay lines completely filled. Same
// integer reference model, mechanism counts and latency check.
module tb_qmf_2d_full;
  import qmf_pkg::*;

  localparam int IMG_W = 512;
  localparam int LINES = 104;
  localparam int PIX_W = 16, CW = 16, TAPS = PROTO_TAPS;
  localparam int NP    = IMG_W * LINES;
  localparam int D     = IMG_W / 2;
  localparam int XW    = PIX_W + 1;
  localparam int RW    = XW + proto_growth(TAPS, CW) + 1 - CW;
  localparam int OW    = RW + proto_growth(TAPS, CW) + 1 - CW;
  localparam int WATCHDOG = 4 * NP + 1000;

  logic clk = 0, rst_n = 0;
  logic pix_valid, pix_ready, out_valid;
  logic [PIX_W-1:0] pix;
  logic signed [OW-1:0] ll, lh, hl, hh;

  qmf_2d dut (.*);

  always #5 clk = !clk;

  int checks = 0, failures = 0;
  longint px [NP];
  longint bl [NP / 2], bh [NP / 2];
  longint e_ll [NP / 2], e_lh [NP / 2], e_hl [NP / 2], e_hh [NP / 2];
  int     kept_pix [NP / 2];      // pixel index that completes output j
  int     acc_cycle [NP];
  int     n_out_exp = 0;
  int     cycle = 0, nacc = 0, nout = 0;
  int     cnt_clear = 0, cnt_idle = 0, cnt_row_drop = 0, cnt_line_drop = 0;
  int     cnt_ll = 0, cnt_lh = 0, cnt_hl = 0, cnt_hh = 0;

  function automatic longint floor_div(input longint v);
    return v >>> CW;
  endfunction

  task automatic build_model();
    longint sl, sh;
    for (int t = 0; t < NP; t += 2) begin
      sl = 0; sh = 0;
      for (int n = 0; n < TAPS; n++)
        if (t - n >= 0) begin
          sl += proto_coef(TAPS, n, CW) * px[t - n];
          sh += ((n % 2 == 1) ? -proto_coef(TAPS, n, CW) : proto_coef(TAPS, n, CW)) * px[t - n];
        end
      bl[t / 2] = floor_div(sl);
      bh[t / 2] = floor_div(sh);
    end
    for (int m = 0; m < NP / 2; m++) begin
      longint a, b, c, d2;
      if ((m / D) % 2 != 0) continue;
      a = 0; b = 0; c = 0; d2 = 0;
      for (int n = 0; n < TAPS; n++)
        if (m - n * D >= 0) begin
          longint cl, chh;
          cl  = proto_coef(TAPS, n, CW);
          chh = (n % 2 == 1) ? -cl : cl;
          a  += cl  * bl[m - n * D];
          b  += chh * bl[m - n * D];
          c  += cl  * bh[m - n * D];
          d2 += chh * bh[m - n * D];
        end
      e_ll[n_out_exp] = floor_div(a);
      e_lh[n_out_exp] = floor_div(b);
      e_hl[n_out_exp] = floor_div(c);
      e_hh[n_out_exp] = floor_div(d2);
      kept_pix[n_out_exp] = 2 * m;
      n_out_exp++;
    end
  endtask

  always @(posedge clk) begin
    if (rst_n) begin
      cycle <= cycle + 1;
      if (!pix_ready) cnt_clear++;
      if (pix_ready && !pix_valid) cnt_idle++;
      if (pix_valid && pix_ready) begin
        acc_cycle[nacc] = cycle;
        if (nacc % 2 == 1) cnt_row_drop++;
        if (nacc % IMG_W == 0 && (nacc / IMG_W) % 2 == 1) cnt_line_drop++;
        nacc++;
      end
      if (out_valid) begin
        checks += 5;
        if (nout >= n_out_exp) begin
          failures++;
          $display("FAIL extra output %0d", nout);
        end else begin
          if (longint'(ll) != e_ll[nout]) begin failures++; $display("FAIL ll %0d: %0d exp %0d", nout, ll, e_ll[nout]); end
          if (longint'(lh) != e_lh[nout]) begin failures++; $display("FAIL lh %0d: %0d exp %0d", nout, lh, e_lh[nout]); end
          if (longint'(hl) != e_hl[nout]) begin failures++; $display("FAIL hl %0d: %0d exp %0d", nout, hl, e_hl[nout]); end
          if (longint'(hh) != e_hh[nout]) begin failures++; $display("FAIL hh %0d: %0d exp %0d", nout, hh, e_hh[nout]); end
          if (cycle - acc_cycle[kept_pix[nout]] != 4) begin
            failures++;
            $display("FAIL latency %0d", cycle - acc_cycle[kept_pix[nout]]);
          end
          if (ll != 0) cnt_ll++;
          if (lh != 0) cnt_lh++;
          if (hl != 0) cnt_hl++;
          if (hh != 0) cnt_hh++;
        end
        nout++;
      end
    end
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog: %0d of %0d outputs", nout, n_out_exp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < NP; t++) begin
      automatic int line = t / IMG_W;
      if (line % 37 == 5)       px[t] = 65535;
      else if (line % 37 == 6)  px[t] = ((t + line) % 2) ? 65535 : 0;
      else                      px[t] = longint'($urandom_range(0, 65535));
    end
    build_model();
    pix_valid = 0;
    pix = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < NP; ) begin
      if ($urandom_range(0, 5) == 0) begin
        pix_valid <= 0;
      end else begin
        pix_valid <= 1;
        pix <= PIX_W'(px[t]);
      end
      @(posedge clk);
      if (pix_valid && pix_ready) t++;
    end
    pix_valid <= 0;
    repeat (10) @(posedge clk);
    checks += 9;
    if (nout != n_out_exp) begin failures++; $display("FAIL outputs %0d exp %0d", nout, n_out_exp); end
    if (cnt_clear < D)     begin failures++; $display("FAIL clear cycles %0d", cnt_clear); end
    if (cnt_idle == 0)     begin failures++; $display("FAIL no idle cycle"); end
    if (cnt_row_drop == 0) begin failures++; $display("FAIL no row decimation"); end
    if (cnt_line_drop == 0) begin failures++; $display("FAIL no line decimation"); end
    if (cnt_ll == 0) begin failures++; $display("FAIL ll never nonzero"); end
    if (cnt_lh == 0) begin failures++; $display("FAIL lh never nonzero"); end
    if (cnt_hl == 0) begin failures++; $display("FAIL hl never nonzero"); end
    if (cnt_hh == 0) begin failures++; $display("FAIL hh never nonzero"); end
    $display("clear %0d idle %0d row-drops %0d line-drops %0d outputs %0d (ll/lh/hl/hh nonzero %0d/%0d/%0d/%0d)",
             cnt_clear, cnt_idle, cnt_row_drop, cnt_line_drop, nout, cnt_ll, cnt_lh, cnt_hl, cnt_hh);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
