// tb_pre_proc: checks the row pre-scaling of stage 0 and stage 1 for a 4-row
// matrix with 20-bit words and 17 fraction bits (the internal format of the
// default QR array). Stage 0 must multiply rows 0..3 by K^-6, K^-6, K^-5,
// K^-4; stage 1 its pivot by K and the other rows by 1 (exactly). Random
// rows are fed one column per clock with bubbles; every output is compared
// with the real product (2 LSB) and must appear after 25 (stage 0) or
// 20 (stage 1) cycles: FRAC + g + 3 for the slowest factor, g the bits
// needed to lift that factor above 1.
module tb_pre_proc;
  import qr_pkg::*;
  localparam int W = 20, FRAC = 17, M = 4;
  localparam int NT = 200, TOL = 2;

  logic clk = 1'b0, rst_n;
  tag_t in_tag, tag0, tag1;
  logic signed [W-1:0] in0 [M], out0 [M];
  logic signed [W-1:0] in1 [M-1], out1 [M-1];

  pre_proc #(.W(W), .FRAC(FRAC), .M(M), .S(0)) dut0 (
    .clk, .rst_n, .in_tag, .in_row(in0), .out_tag(tag0), .out_row(out0));
  pre_proc #(.W(W), .FRAC(FRAC), .M(M), .S(1)) dut1 (
    .clk, .rst_n, .in_tag, .in_row(in1), .out_tag(tag1), .out_row(out1));

  always #5 clk = ~clk;

  real f0 [M]   = '{0.0, 0.0, 0.0, 0.0};
  real f1 [M-1] = '{0.0, 0.0, 0.0};
  int  x0 [NT][M], x1 [NT][M-1];
  int  t_in [NT];
  int  checks = 0, failures = 0, g0 = 0, g1 = 0, cyc = 0;

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    f0[0] = 1.0 / K_GAIN ** 6; f0[1] = f0[0]; f0[2] = 1.0 / K_GAIN ** 5; f0[3] = 1.0 / K_GAIN ** 4;
    f1[0] = K_GAIN; f1[1] = 1.0; f1[2] = 1.0;
    rst_n = 1'b0; in_tag = '0;
    foreach (in0[r]) in0[r] = '0;
    foreach (in1[r]) in1[r] = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int t = 0; t < NT; t++) begin
      @(negedge clk);
      for (int r = 0; r < M; r++) begin
        x0[t][r] = int'($urandom_range(0, 230000)) - 115000;   // |x| < 0.88
        in0[r] = W'(x0[t][r]);
      end
      for (int r = 0; r < M - 1; r++) begin
        x1[t][r] = int'($urandom_range(0, 150000)) - 75000;    // |x| < 0.58
        in1[r] = W'(x1[t][r]);
      end
      in_tag = '{valid: 1'b1, col: COLW'(t)};
      if ($urandom_range(0, 3) == 0) begin @(negedge clk); in_tag = '0; end
    end
    @(negedge clk); in_tag = '0;
  end

  always @(posedge clk) begin
    if (in_tag.valid) t_in[in_tag.col] <= cyc;
    if (rst_n && tag0.valid) begin
      for (int r = 0; r < M; r++) begin
        int e;
        e = int'(real'(out0[r]) - real'(x0[g0][r]) * f0[r]);
        checks++;
        if (e > TOL || e < -TOL) begin
          failures++;
          if (failures < 10) $display("S0 #%0d row %0d: %0d expected %f", g0, r, out0[r], real'(x0[g0][r]) * f0[r]);
        end
      end
      checks++;
      if (cyc - t_in[g0] != 25) begin failures++; $display("S0 latency %0d", cyc - t_in[g0]); end
      g0++;
    end
    if (rst_n && tag1.valid) begin
      for (int r = 0; r < M - 1; r++) begin
        int e;
        e = int'(real'(out1[r]) - real'(x1[g1][r]) * f1[r]);
        checks++;
        if (e > ((r == 0) ? TOL : 0) || e < -((r == 0) ? TOL : 0)) begin
          failures++;
          if (failures < 10) $display("S1 #%0d row %0d: %0d expected %f", g1, r, out1[r], real'(x1[g1][r]) * f1[r]);
        end
      end
      checks++;
      if (cyc - t_in[g1] != 20) begin failures++; $display("S1 latency %0d", cyc - t_in[g1]); end
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
