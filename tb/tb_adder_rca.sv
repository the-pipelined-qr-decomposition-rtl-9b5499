// tb_adder_rca: tests the ripple-carry adder at the default width (14 bits) and at
// 9 bits (a width that leaves a partial last group). Corner operands (zero,
// all ones, alternating bits, long carry chains) and random operands with
// both carry-in values are checked against the arithmetic sum a + b + cin.
module tb_adder_rca;
  localparam int W1 = 14;
  localparam int W2 = 9;
  int checks = 0, failures = 0;

  logic [W1-1:0] a1, b1, s1;
  logic          c1, co1;
  logic [W2-1:0] a2, b2, s2;
  logic          c2, co2;

  adder_rca #(.W(W1)) dut1 (.a(a1), .b(b1), .cin(c1), .sum(s1), .cout(co1));
  adder_rca #(.W(W2)) dut2 (.a(a2), .b(b2), .cin(c2), .sum(s2), .cout(co2));

  task automatic check1(input logic [W1-1:0] a, input logic [W1-1:0] b, input logic c);
    logic [W1:0] exp_v;
    a1 = a; b1 = b; c1 = c;
    #1;
    exp_v = {1'b0, a} + {1'b0, b} + (W1+1)'(c);
    checks++;
    if ({co1, s1} != exp_v) begin
      failures++;
      if (failures < 10) $display("W=%0d %h + %h + %0d = %h, expected %h", W1, a, b, c, {co1, s1}, exp_v);
    end
  endtask

  task automatic check2(input logic [W2-1:0] a, input logic [W2-1:0] b, input logic c);
    logic [W2:0] exp_v;
    a2 = a; b2 = b; c2 = c;
    #1;
    exp_v = {1'b0, a} + {1'b0, b} + (W2+1)'(c);
    checks++;
    if ({co2, s2} != exp_v) begin
      failures++;
      if (failures < 10) $display("W=%0d %h + %h + %0d = %h, expected %h", W2, a, b, c, {co2, s2}, exp_v);
    end
  endtask

  initial begin
    logic [W1-1:0] corner [6];
    corner = '{'0, '1, {(W1/2){2'b01}}, {(W1/2){2'b10}}, W1'(1), {1'b1, {(W1-1){1'b0}}}};
    foreach (corner[i]) foreach (corner[j]) for (int c = 0; c < 2; c++) begin
      check1(corner[i], corner[j], 1'(c));
      check2(corner[i][W2-1:0], corner[j][W2-1:0], 1'(c));
    end
    for (int t = 0; t < 3000; t++) begin
      check1(W1'($urandom), W1'($urandom), 1'($urandom));
      check2(W2'($urandom), W2'($urandom), 1'($urandom));
    end
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
