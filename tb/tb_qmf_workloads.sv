// tb_qmf_workloads: runs the 1-D QMF bank at the filter lengths and
// coefficient word lengths of the design examples other than the default:
// 80 taps with 8-bit, 120 taps with 16-bit and 250 taps with 24-bit
// coefficients, each on random 17-bit samples, checking every decimated
// low-pass and high-pass output against an integer convolution.
module tb_qmf_workloads;
  logic clk = 0, rst_n = 0;
  logic d80, d120, d250;
  int   c80, c120, c250, f80, f120, f250;
  int   checks, failures;

  always #5 clk = !clk;

  qmf_bank_harness #(.TAPS(80),  .CW(8),  .NS(600))  h80  (.clk, .rst_n, .done(d80),  .checks(c80),  .failures(f80));
  qmf_bank_harness #(.TAPS(120), .CW(16), .NS(600))  h120 (.clk, .rst_n, .done(d120), .checks(c120), .failures(f120));
  qmf_bank_harness #(.TAPS(250), .CW(24), .NS(1000)) h250 (.clk, .rst_n, .done(d250), .checks(c250), .failures(f250));

  initial begin
    repeat (5000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", c80 + c120 + c250, f80 + f120 + f250 + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    wait (d80 && d120 && d250);
    @(posedge clk);
    checks   = c80 + c120 + c250 + 3;
    failures = f80 + f120 + f250;
    if (c80 != 600)  failures++;
    if (c120 != 600) failures++;
    if (c250 != 1000) failures++;
    $display("80 taps: %0d checks, 120 taps: %0d, 250 taps: %0d", c80, c120, c250);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
