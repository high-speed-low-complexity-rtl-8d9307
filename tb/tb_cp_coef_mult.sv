// tb_cp_coef_mult: self-checking test of the coefficient-partitioning
// multiplier network, fed by the shared subexpressions of cse_subexpr.
// Drives the default (worked example) coefficient 0.0101001010000101 and a
// second, negative coefficient with [1 0 -1] patterns through corner and
// random inputs and compares against a plain integer product. It also checks
// that the example coefficient elaborates to the worked-example structure:
// three CSE terms, one of them in the MSB half.
module tb_cp_coef_mult;
  import qmf_pkg::*;

  localparam int     XW  = 16;
  localparam longint C2  = -64'sd13939;   // negative, with [1 0 -1] pairs
  localparam int     YW  = 34;

  logic signed [XW-1:0] x;
  logic signed [YW-1:0] y1, y2;
  int checks = 0, failures = 0;

  logic signed [XW+2:0] x5, x3;

  cse_subexpr #(.XW(XW)) u_cse (.x(x), .x5(x5), .x3(x3));
  cp_coef_mult dut (.x1(x), .x5(x5), .x3(x3), .y(y1));
  cp_coef_mult #(.XW(XW), .COEF(C2), .YW(YW)) dut2 (.x1(x), .x5(x5), .x3(x3), .y(y2));

  task automatic check_one(input logic signed [XW-1:0] v);
    longint e1, e2;
    x = v;
    #1;
    e1 = longint'(v) * 21125;
    e2 = longint'(v) * C2;
    checks += 2;
    if (longint'(y1) != e1) begin
      failures++;
      $display("FAIL x=%0d y=%0d exp=%0d", v, y1, e1);
    end
    if (longint'(y2) != e2) begin
      failures++;
      $display("FAIL C2 x=%0d y=%0d exp=%0d", v, y2, e2);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // structure of the worked example
    checks++;
    if (dut.NT != 3 || dut.NM != 1) begin
      failures++;
      $display("FAIL structure NT=%0d NM=%0d", dut.NT, dut.NM);
    end
    $display("example coefficient: %0d terms, %0d adder full-adder bits after x5",
             dut.NT, dut.FULL_ADDERS);
    check_one(16'sd0);
    check_one(16'sd1);
    check_one(-16'sd1);
    check_one(16'sh7fff);
    check_one(-16'sh8000);
    check_one(16'sd12345);
    for (int i = 0; i < 2000; i++) check_one(XW'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
