// tb_addsub: tests the CORDIC add/subtract unit with each of the four adder
// architectures. Random and corner operands, both operations; the result
// must equal a + b or a - b modulo 2^W.
module tb_addsub;
  import qr_pkg::*;
  localparam int W = 14;
  int checks = 0, failures = 0;

  logic [W-1:0] a, b;
  logic         sub;
  logic [W-1:0] y [4];

  addsub #(.W(W), .ARCH(ADD_RCA))   d0 (.a, .b, .sub, .y(y[0]));
  addsub #(.W(W), .ARCH(ADD_CLA))   d1 (.a, .b, .sub, .y(y[1]));
  addsub #(.W(W), .ARCH(ADD_CSEL))  d2 (.a, .b, .sub, .y(y[2]));
  addsub #(.W(W), .ARCH(ADD_CSKIP)) d3 (.a, .b, .sub, .y(y[3]));

  task automatic check(input logic [W-1:0] ta, input logic [W-1:0] tb, input logic ts);
    logic [W-1:0] exp_v;
    a = ta; b = tb; sub = ts;
    #1;
    exp_v = ts ? ta - tb : ta + tb;
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (y[k] !== exp_v) begin
        failures++;
        if (failures < 10) $display("arch %0d: %h %s %h = %h, expected %h", k, ta, ts ? "-" : "+", tb, y[k], exp_v);
      end
    end
  endtask

  initial begin
    check('0, '0, 1'b1);
    check('0, W'(1), 1'b1);
    check('1, W'(1), 1'b0);
    check({1'b1, {(W-1){1'b0}}}, W'(1), 1'b1);
    for (int t = 0; t < 4000; t++) check(W'($urandom), W'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
