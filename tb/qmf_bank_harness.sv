// qmf_bank_harness: testbench helper that runs one 1-D QMF bank
// (qmf_bank_1d, delay 1) of a given length and coefficient word length on
// NS random samples and checks every decimated low-pass and high-pass
// output against a direct integer convolution with the rounded prototype
// coefficients (high-pass: (-1)^n C_n). Reports done, checks and failures.
module qmf_bank_harness
  import qmf_pkg::*;
#(
  parameter int TAPS = 80,
  parameter int CW   = 8,
  parameter int NS   = 600
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int XW = 17;
  localparam int AW = XW + proto_growth(TAPS, CW) + 1;

  logic in_valid = 1'b0, in_ready, out_valid;
  logic signed [XW-1:0] x = '0;
  logic signed [AW-1:0] lp, hp;
  longint hist [NS];
  int nin = 0, nexp = 0;

  qmf_bank_1d #(.XW(XW), .TAPS(TAPS), .CW(CW), .D(1)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .x, .out_valid, .lp, .hp);

  // rounded coefficient, worked out from the 24-bit table
  function automatic longint c_of(input int n);
    longint h;
    h = proto_h24(TAPS, n);
    if (CW < 24) h = (h + (longint'(1) << (23 - CW))) >>> (24 - CW);
    return h;
  endfunction

  function automatic longint ref_y(input int t, input bit hi);
    longint s = 0;
    for (int n = 0; n < TAPS && n <= t; n++)
      s += ((hi && n % 2 == 1) ? -c_of(n) : c_of(n)) * hist[t - n];
    return s;
  endfunction

  initial begin
    checks = 0;
    failures = 0;
    done = 0;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      if (in_valid && in_ready) nin <= nin + 1;
      if (nin + ((in_valid && in_ready) ? 1 : 0) < NS) begin
        in_valid <= 1'b1;
        x        <= XW'($urandom);
      end else begin
        in_valid <= 1'b0;
      end
      if (out_valid) begin
        checks = checks + 2;
        if (longint'(lp) != ref_y(nexp, 0)) begin
          failures = failures + 1;
          $display("FAIL taps=%0d cw=%0d lp t=%0d", TAPS, CW, nexp);
        end
        if (longint'(hp) != ref_y(nexp, 1)) begin
          failures = failures + 1;
          $display("FAIL taps=%0d cw=%0d hp t=%0d", TAPS, CW, nexp);
        end
        nexp = nexp + 2;
        if (nexp >= NS) done <= 1'b1;
      end
    end
  end

  // record each accepted sample
  always @(posedge clk)
    if (rst_n && in_valid && in_ready) hist[nin] = longint'(x);

endmodule
