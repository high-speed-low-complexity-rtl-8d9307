// tb_qmf_mult_block: checks every product of the prototype filter's
// multiplier block, p[n] = x * |C_n|, against integer multiplication for
// corner and random inputs: the default (50 taps, 16-bit coefficients),
// 250 taps with 24-bit coefficients and 80 taps with 8-bit coefficients.
module tb_qmf_mult_block;
  import qmf_pkg::*;

  localparam int XW = 17;
  logic signed [XW-1:0]    x;
  logic signed [XW+16-1:0] p16 [PROTO_TAPS];
  logic signed [XW+24-1:0] p24 [250];
  logic signed [XW+8-1:0]  p8  [80];
  int checks = 0, failures = 0;

  qmf_mult_block dut16 (.x(x), .p(p16));
  qmf_mult_block #(.XW(XW), .TAPS(250), .CW(24)) dut24 (.x(x), .p(p24));
  qmf_mult_block #(.XW(XW), .TAPS(80),  .CW(8))  dut8  (.x(x), .p(p8));

  // |round(h * 2**wl)| for tap n of a taps-long prototype
  function automatic longint ref_mag(input int taps, input int n, input int wl);
    longint h;
    h = proto_h24(taps, n);
    if (wl < 24) h = (h + (longint'(1) << (23 - wl))) >>> (24 - wl);
    return h < 0 ? -h : h;
  endfunction

  task automatic check_one(input logic signed [XW-1:0] v);
    x = v;
    #1;
    for (int n = 0; n < 250; n++) begin
      checks++;
      if (longint'(p24[n]) != longint'(v) * ref_mag(250, n, 24)) begin
        failures++;
        $display("FAIL 250/24 n=%0d x=%0d p=%0d", n, v, p24[n]);
      end
      if (n < 80) begin
        checks++;
        if (longint'(p8[n]) != longint'(v) * ref_mag(80, n, 8)) begin
          failures++;
          $display("FAIL 80/8 n=%0d x=%0d p=%0d", n, v, p8[n]);
        end
      end
      if (n < 50) begin
        checks++;
        if (longint'(p16[n]) != longint'(v) * ref_mag(50, n, 16)) begin
          failures++;
          $display("FAIL 50/16 n=%0d x=%0d p=%0d", n, v, p16[n]);
        end
      end
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check_one('0);
    check_one(17'sd1);
    check_one(-17'sd1);
    check_one(17'sd65535);
    check_one(-17'sd65536);
    for (int i = 0; i < 300; i++) check_one(XW'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
