// tb_qmf_bank_1d: drives two 1-D QMF banks (delay D = 1 and D = 5) with the
// same random stream, including idle cycles, and checks every decimated
// low-pass and high-pass output against a direct convolution
// y[t] = sum_n c_n x[t - n*D] with c_n = C_n (low-pass) or (-1)^n C_n
// (high-pass), kept when floor(t/D) is even. It also checks the clear time
// after reset (in_ready low for D cycles) and the two-cycle latency.
module tb_qmf_bank_1d;
  import qmf_pkg::*;

  localparam int XW = 17, TAPS = PROTO_TAPS, CW = 16;
  localparam int NS = 1200;
  localparam int AW = XW + proto_growth(TAPS, CW) + 1;

  logic clk = 0, rst_n = 0;
  logic in_valid;
  logic signed [XW-1:0] x;
  logic rdy1, rdy5, ov1, ov5;
  logic signed [AW-1:0] lp1, hp1, lp5, hp5;
  int checks = 0, failures = 0;
  longint hist [NS];
  int acc_cycle [NS];
  int nin = 0, nout1 = 0, nout5 = 0, cycle = 0, idle = 0;
  int rdy1_cyc = -1, rdy5_cyc = -1;

  always #5 clk = !clk;

  qmf_bank_1d u1 (.clk, .rst_n, .in_valid, .in_ready(rdy1), .x,
                  .out_valid(ov1), .lp(lp1), .hp(hp1));
  qmf_bank_1d #(.XW(XW), .TAPS(TAPS), .CW(CW), .D(5)) u5 (
    .clk, .rst_n, .in_valid, .in_ready(rdy5), .x,
    .out_valid(ov5), .lp(lp5), .hp(hp5));

  function automatic longint ref_y(input int t, input int d, input bit hi);
    longint s = 0;
    for (int n = 0; n < TAPS; n++) begin
      if (t - n * d >= 0) begin
        if (hi && (n % 2 == 1)) s -= proto_coef(TAPS, n, CW) * hist[t - n * d];
        else                    s += proto_coef(TAPS, n, CW) * hist[t - n * d];
      end
    end
    return s;
  endfunction

  // Next kept sample index for a bank with delay d, starting at t.
  function automatic int next_kept(input int t, input int d);
    while ((t / d) % 2 != 0) t++;
    return t;
  endfunction

  int exp1 = 0, exp5 = 0, nacc = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      cycle <= cycle + 1;
      if (in_valid && rdy1 && rdy5) begin
        acc_cycle[nacc] = cycle;
        nacc++;
      end
      if (rdy1 && rdy1_cyc < 0) rdy1_cyc <= cycle;
      if (rdy5 && rdy5_cyc < 0) rdy5_cyc <= cycle;
      if (ov1) begin
        exp1 = next_kept(exp1, 1);
        checks += 3;
        if (longint'(lp1) != ref_y(exp1, 1, 0)) begin failures++; $display("FAIL D1 lp t=%0d", exp1); end
        if (longint'(hp1) != ref_y(exp1, 1, 1)) begin failures++; $display("FAIL D1 hp t=%0d", exp1); end
        if (cycle - acc_cycle[exp1] != 2) begin failures++; $display("FAIL D1 latency %0d", cycle - acc_cycle[exp1]); end
        exp1++; nout1++;
      end
      if (ov5) begin
        exp5 = next_kept(exp5, 5);
        checks += 3;
        if (longint'(lp5) != ref_y(exp5, 5, 0)) begin failures++; $display("FAIL D5 lp t=%0d", exp5); end
        if (longint'(hp5) != ref_y(exp5, 5, 1)) begin failures++; $display("FAIL D5 hp t=%0d", exp5); end
        if (cycle - acc_cycle[exp5] != 2) begin failures++; $display("FAIL D5 latency"); end
        exp5++; nout5++;
      end
    end
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0;
    x = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    while (!(rdy1 && rdy5)) @(posedge clk);
    while (nin < NS) begin
      if ($urandom_range(0, 7) == 0) begin
        in_valid <= 0;
        idle++;
      end else begin
        in_valid <= 1;
        x <= (nin < 4) ? ((nin % 2 == 0) ? 17'sd65535 : -17'sd65536) : XW'($urandom);
      end
      @(posedge clk);
      if (in_valid) begin
        hist[nin] = longint'(x);
        nin++;
      end
    end
    in_valid <= 0;
    repeat (5) @(posedge clk);
    checks += 4;
    if (rdy1_cyc != 1) begin failures++; $display("FAIL D1 clear took %0d", rdy1_cyc); end
    if (rdy5_cyc != 5) begin failures++; $display("FAIL D5 clear took %0d", rdy5_cyc); end
    if (nout1 != NS / 2) begin failures++; $display("FAIL D1 outputs %0d", nout1); end
    if (nout5 != NS / 2) begin failures++; $display("FAIL D5 outputs %0d", nout5); end
    if (idle == 0) begin failures++; $display("FAIL no idle cycles"); end
    $display("inputs %0d idle cycles %0d outputs %0d/%0d", nin, idle, nout1, nout5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
