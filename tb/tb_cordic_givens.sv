// tb_cordic_givens: streams groups of one leading element pair followed by
// three following pairs (one per clock, with random bubbles) through the
// circular CORDIC (14-bit, 11 fraction bits, 12 iterations). For each group
// the angle is that of the leading pair, with the pair negated first when
// its x is negative. Expected outputs, computed with real arithmetic:
//   leader:    x' = Kn*sqrt(x^2+y^2), y' = 0
//   follower:  x' = Kn*(c*x + s*y),   y' = Kn*(-s*x + c*y)
// where Kn is the gain of 12 iterations. Tolerance 16 LSB (truncating shifts). The latency must
// be NITER + 1 cycles. Counts leaders with negative x (quadrant step).
module tb_cordic_givens;
  import qr_pkg::*;
  localparam int W = 14, NITER = 12;
  localparam int NG = 200, GS = 4;
  localparam int TOL = 16;   // truncation of up to NITER shifted terms, times K

  logic clk = 1'b0, rst_n;
  tag_t in_tag, out_tag;
  logic in_lead, out_lead;
  logic signed [W-1:0] x, y, xo, yo;

  cordic_givens #(.W(W), .NITER(NITER)) dut (
    .clk, .rst_n, .in_tag, .in_lead, .in_x(x), .in_y(y),
    .out_tag, .out_lead, .out_x(xo), .out_y(yo));

  always #5 clk = ~clk;

  real ex [NG*GS], ey [NG*GS];
  int  t_in [NG*GS];
  int  checks = 0, failures = 0, got = 0, cyc = 0, nneg = 0, idx = 0;
  real kn;

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    rst_n = 1'b0; in_tag = '0; in_lead = 1'b0; x = '0; y = '0;
    kn = 1.0;
    for (int i = 0; i < NITER; i++) kn = kn * $sqrt(1.0 + 2.0 ** (-2 * i));
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int g = 0; g < NG; g++) begin
      real c, s, h;
      int sg;
      for (int k = 0; k < GS; k++) begin
        int xi, yi;
        real xr, yr;
        xi = int'($urandom_range(0, 2400)) - 1200;     // |x|,|y| < 0.59
        yi = int'($urandom_range(0, 2400)) - 1200;
        if (k == 0) begin
          if (xi == 0 && yi == 0) xi = 5;
          sg = (xi < 0) ? -1 : 1;
          if (sg < 0) nneg++;
          h = $sqrt(real'(xi) ** 2 + real'(yi) ** 2);
          c = sg * xi / h; s = sg * yi / h;
        end
        xr = sg * xi; yr = sg * yi;
        ex[idx] = kn * (c * xr + s * yr);
        ey[idx] = kn * (-s * xr + c * yr);
        @(negedge clk);
        x = W'(xi); y = W'(yi); in_lead = (k == 0);
        in_tag = '{valid: 1'b1, col: COLW'(idx)};
        idx++;
        if ($urandom_range(0, 4) == 0) begin
          @(negedge clk); in_tag = '0; in_lead = $urandom_range(0, 1) == 1;  // bubble
        end
      end
    end
    @(negedge clk); in_tag = '0; in_lead = 1'b0;
  end

  always @(posedge clk) begin
    if (in_tag.valid) t_in[in_tag.col] <= cyc;
    if (rst_n && out_tag.valid) begin
      int e1, e2;
      e1 = int'(real'(xo) - ex[got]);
      e2 = int'(real'(yo) - ey[got]);
      checks += 4;
      if (e1 > TOL || e1 < -TOL || e2 > TOL || e2 < -TOL) begin
        failures++;
        if (failures < 10) $display("#%0d out (%0d,%0d) expected (%f,%f)", got, xo, yo, ex[got], ey[got]);
      end
      if (out_lead != (got % GS == 0)) failures++;
      if (int'(out_tag.col) != got % 256) failures++;
      if (cyc - t_in[got % 256] != NITER + 1) failures++;
      got++;
      if (got == NG * GS) begin
        checks++;
        if (nneg == 0) failures++;
        $display("negative leaders: %0d", nneg);
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end

  initial begin
    repeat (NG * GS * 3 + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
