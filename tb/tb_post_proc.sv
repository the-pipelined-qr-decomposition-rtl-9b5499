// tb_post_proc: checks the R-row post-scaling for a 4-row matrix with 20-bit
// words and 17 fraction bits. Row 0 is multiplied by K^3 (latency 22 = FRAC
// + 2 guard bits + 2 left-shift iterations + 1), row 1 by K^2 with the
// element of column 0 forced to zero (latency 21), row 3 is only masked
// (columns 0..2 zero, latency 0). Columns cycle 0..3 with bubbles; results
// are compared with real products (2 LSB).
module tb_post_proc;
  import qr_pkg::*;
  localparam int W = 20, FRAC = 17, M = 4;
  localparam int NT = 200, TOL = 2;

  logic clk = 1'b0, rst_n;
  tag_t in_tag, tag0, tag1, tag3;
  logic signed [W-1:0] x, r0, r1, r3;

  post_proc #(.W(W), .FRAC(FRAC), .M(M), .S(0)) dut0 (.clk, .rst_n, .in_tag, .in_r(x), .out_tag(tag0), .out_r(r0));
  post_proc #(.W(W), .FRAC(FRAC), .M(M), .S(1)) dut1 (.clk, .rst_n, .in_tag, .in_r(x), .out_tag(tag1), .out_r(r1));
  post_proc #(.W(W), .FRAC(FRAC), .M(M), .S(3)) dut3 (.clk, .rst_n, .in_tag, .in_r(x), .out_tag(tag3), .out_r(r3));

  always #5 clk = ~clk;

  int  xs [NT];
  int  checks = 0, failures = 0, g0 = 0, g1 = 0, cyc = 0;

  always @(posedge clk) cyc <= cyc + 1;

  task automatic chk(input string nm, input int got, input real expv, input int lat, input int expl);
    int e;
    e = int'(real'(got) - expv);
    checks += 2;
    if (e > TOL || e < -TOL) begin
      failures++;
      if (failures < 10) $display("%s: %0d expected %f", nm, got, expv);
    end
    if (lat != expl) begin failures++; $display("%s latency %0d expected %0d", nm, lat, expl); end
  endtask

  initial begin
    rst_n = 1'b0; in_tag = '0; x = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int t = 0; t < NT; t++) begin
      @(negedge clk);
      xs[t] = int'($urandom_range(0, 100000)) - 50000;      // |x| < 0.39
      x = W'(xs[t]);
      in_tag = '{valid: 1'b1, col: COLW'(t % 4)};
      #1;
      // row 3: combinational masking only
      chk("S3", int'(r3), (t % 4 < 3) ? 0.0 : real'(xs[t]), 0, 0);
      if ($urandom_range(0, 3) == 0) begin @(negedge clk); in_tag = '0; end
    end
    @(negedge clk); in_tag = '0;
  end

  int tin_q [$];
  int tin_q1 [$];
  always @(posedge clk) begin
    if (rst_n && in_tag.valid) begin tin_q.push_back(cyc); tin_q1.push_back(cyc); end
    if (rst_n && tag0.valid) begin
      chk("S0", int'(r0), real'(xs[g0]) * K_GAIN ** 3, cyc - tin_q.pop_front(), 22);
      g0++;
    end
    if (rst_n && tag1.valid) begin
      chk("S1", int'(r1), (g1 % 4 == 0) ? 0.0 : real'(xs[g1]) * K_GAIN ** 2, cyc - tin_q1.pop_front(), 21);
      g1++;
    end
    if (g0 == NT && g1 == NT) begin
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    repeat (NT * 3 + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
