// tb_qmf_dwt2d: end-to-end test of the tree-structured 2-D decomposition
// (three levels) at a reduced line length of 32 pixels. The image (random
// pixels with saturated lines and a checkerboard band) is streamed with
// random idle cycles. An integer model computes each level from the LL band
// of the previous one: row convolution with the rounded prototype, floor by
// 2**CW, keep even samples; column convolution over every (W/2)-th sample,
// floor, keep even lines. Every output of every level is compared in order.
// Counted mechanisms, each of which must occur: line-buffer clear after
// reset, idle input cycles, outputs of each level, and non-zero values in
// every detail band of every level and in the final LL band.
module tb_qmf_dwt2d;
  import qmf_pkg::*;

  localparam int IMG_W  = 32;
  localparam int LINES  = 480;
  localparam int LEVELS = 3;
  localparam int PIX_W = 16, CW = 16, TAPS = PROTO_TAPS;
  localparam int G      = 2 * (proto_growth(TAPS, CW) + 1 - CW) + 1;
  localparam int OW     = PIX_W + LEVELS * G;
  localparam int NP     = IMG_W * LINES;

  logic clk = 0, rst_n = 0;
  logic pix_valid, pix_ready, ll_valid;
  logic [PIX_W-1:0] pix;
  logic [LEVELS-1:0] det_valid;
  logic signed [OW-1:0] lh [LEVELS], hl [LEVELS], hh [LEVELS];
  logic signed [OW-1:0] ll;

  qmf_dwt2d #(.PIX_W(PIX_W), .IMG_W(IMG_W), .TAPS(TAPS), .CW(CW), .LEVELS(LEVELS)) dut (.*);

  always #5 clk = !clk;

  typedef longint q_t [$];
  int checks = 0, failures = 0;
  q_t img;
  q_t m_ll [LEVELS], m_lh [LEVELS], m_hl [LEVELS], m_hh [LEVELS];
  int got [LEVELS];
  int got_ll = 0;
  int nz_lh [LEVELS], nz_hl [LEVELS], nz_hh [LEVELS];
  int nz_ll = 0, cnt_clear = 0, cnt_idle = 0;

  function automatic longint c_of(input int n, input bit hi);
    longint c;
    c = proto_coef(TAPS, n, CW);
    return (hi && n % 2 == 1) ? -c : c;
  endfunction

  // One 2-D level of the model on a raster stream of line length w.
  task automatic model_level(input q_t src, input int w, output q_t oll,
                             output q_t olh, output q_t ohl, output q_t ohh);
    q_t bl, bh;
    int d = w / 2;
    for (int t = 0; t < src.size(); t += 2) begin
      longint sl = 0, sh = 0;
      for (int n = 0; n < TAPS && n <= t; n++) begin
        sl += c_of(n, 0) * src[t - n];
        sh += c_of(n, 1) * src[t - n];
      end
      bl.push_back(sl >>> CW);
      bh.push_back(sh >>> CW);
    end
    oll = {}; olh = {}; ohl = {}; ohh = {};
    for (int m = 0; m < bl.size(); m++) begin
      longint a = 0, b = 0, c = 0, e = 0;
      if ((m / d) % 2 != 0) continue;
      for (int n = 0; n < TAPS && n * d <= m; n++) begin
        a += c_of(n, 0) * bl[m - n * d];
        b += c_of(n, 1) * bl[m - n * d];
        c += c_of(n, 0) * bh[m - n * d];
        e += c_of(n, 1) * bh[m - n * d];
      end
      oll.push_back(a >>> CW);
      olh.push_back(b >>> CW);
      ohl.push_back(c >>> CW);
      ohh.push_back(e >>> CW);
    end
  endtask

  always @(posedge clk) begin
    if (rst_n) begin
      if (!pix_ready) cnt_clear++;
      if (pix_ready && !pix_valid) cnt_idle++;
      for (int l = 0; l < LEVELS; l++) begin
        if (det_valid[l]) begin
          checks += 3;
          if (got[l] >= m_lh[l].size()) begin
            failures++;
            $display("FAIL level %0d extra output", l);
          end else begin
            if (longint'(lh[l]) != m_lh[l][got[l]]) begin failures++; $display("FAIL L%0d lh %0d: %0d exp %0d", l, got[l], lh[l], m_lh[l][got[l]]); end
            if (longint'(hl[l]) != m_hl[l][got[l]]) begin failures++; $display("FAIL L%0d hl %0d", l, got[l]); end
            if (longint'(hh[l]) != m_hh[l][got[l]]) begin failures++; $display("FAIL L%0d hh %0d", l, got[l]); end
            if (lh[l] != 0) nz_lh[l]++;
            if (hl[l] != 0) nz_hl[l]++;
            if (hh[l] != 0) nz_hh[l]++;
          end
          got[l]++;
        end
      end
      if (ll_valid) begin
        checks++;
        if (got_ll >= m_ll[LEVELS-1].size() || longint'(ll) != m_ll[LEVELS-1][got_ll]) begin
          failures++;
          $display("FAIL ll %0d", got_ll);
        end
        if (ll != 0) nz_ll++;
        got_ll++;
      end
    end
  end

  initial begin
    repeat (4 * NP + 1000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int l = 0; l < LEVELS; l++) begin
      got[l] = 0; nz_lh[l] = 0; nz_hl[l] = 0; nz_hh[l] = 0;
    end
    for (int t = 0; t < NP; t++) begin
      automatic int line = t / IMG_W;
      if (line % 61 == 7)                     img.push_back(65535);
      else if (line % 61 >= 20 && line % 61 < 24) img.push_back(((t + line) % 2 == 1) ? 65535 : 0);
      else                                    img.push_back(longint'($urandom_range(0, 65535)));
    end
    model_level(img, IMG_W, m_ll[0], m_lh[0], m_hl[0], m_hh[0]);
    for (int l = 1; l < LEVELS; l++)
      model_level(m_ll[l-1], IMG_W >> l, m_ll[l], m_lh[l], m_hl[l], m_hh[l]);
    pix_valid = 0;
    pix = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < NP; ) begin
      if ($urandom_range(0, 6) == 0) begin
        pix_valid <= 0;
      end else begin
        pix_valid <= 1;
        pix <= PIX_W'(img[t]);
      end
      @(posedge clk);
      if (pix_valid && pix_ready) t++;
    end
    pix_valid <= 0;
    repeat (20) @(posedge clk);
    checks += 3 + 4 * LEVELS + 1;
    if (cnt_clear < IMG_W / 2) begin failures++; $display("FAIL clear %0d", cnt_clear); end
    if (cnt_idle == 0) begin failures++; $display("FAIL no idle cycle"); end
    if (got_ll != m_ll[LEVELS-1].size() || nz_ll == 0) begin failures++; $display("FAIL ll count %0d", got_ll); end
    for (int l = 0; l < LEVELS; l++) begin
      $display("level %0d: %0d outputs (model %0d), non-zero lh/hl/hh %0d/%0d/%0d",
               l, got[l], m_lh[l].size(), nz_lh[l], nz_hl[l], nz_hh[l]);
      if (got[l] != m_lh[l].size() || got[l] == 0) begin failures++; $display("FAIL level %0d count", l); end
      if (nz_lh[l] == 0) begin failures++; $display("FAIL level %0d lh all zero", l); end
      if (nz_hl[l] == 0) begin failures++; $display("FAIL level %0d hl all zero", l); end
      if (nz_hh[l] == 0) begin failures++; $display("FAIL level %0d hh all zero", l); end
    end
    $display("clear %0d idle %0d final ll %0d", cnt_clear, cnt_idle, got_ll);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
