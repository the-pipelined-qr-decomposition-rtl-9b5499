// tb_givens_proc: checks the rotation chain of stage 0 of a 4 x 4 matrix
// (20-bit words, 17 fraction bits, 18 iterations). Random matrices are
// streamed one column per clock with bubbles, rows already gain-balanced as
// the pre-processing would leave them (rows scaled by K^-3, K^-3, K^-2,
// K^-1). Reference: real Givens rotations of the unscaled matrix, pivot row
// 0 against rows 1, 2, 3. Expected: out_r = R row 0 (gain 1, non-negative
// leading element), out_next[j-1] = rotated row j with gain K^-(3-j) for
// columns 1..3. Tolerance 128 LSB (truncating CORDIC shifts); latency 3 * (NITER+1) = 57 cycles.
module tb_givens_proc;
  import qr_pkg::*;
  localparam int W = 20, FRAC = 17, NITER = 18, M = 4, N = 4;
  localparam int NMAT = 100, TOL = 128;  // 2^-10: one LSB of a 14-bit word with 11 fraction bits, doubled
  localparam real ONE = 131072.0;

  logic clk = 1'b0, rst_n;
  tag_t in_tag, out_tag;
  logic signed [W-1:0] in_row [M], out_r, out_next [M-1];

  givens_proc #(.W(W), .NITER(NITER), .M(M), .S(0)) dut (
    .clk, .rst_n, .in_tag, .in_row, .out_tag, .out_r, .out_next);

  always #5 clk = ~clk;

  real a [NMAT][M][N], rr [NMAT][M][N];
  int  tin [$];
  int  checks = 0, failures = 0, got = 0, cyc = 0, nneg = 0;

  always @(posedge clk) cyc <= cyc + 1;

  task automatic reference(input int t);
    real w [M][N];
    real c, s, h, p, q;
    for (int i = 0; i < M; i++) for (int j = 0; j < N; j++) w[i][j] = a[t][i][j];
    if (w[0][0] < 0.0) nneg++;
    for (int j = 1; j < M; j++) begin
      h = $sqrt(w[0][0] ** 2 + w[j][0] ** 2);
      c = w[0][0] / h; s = w[j][0] / h;
      for (int n = 0; n < N; n++) begin
        p = w[0][n]; q = w[j][n];
        w[0][n] = c * p + s * q;
        w[j][n] = -s * p + c * q;
      end
    end
    rr[t] = w;
  endtask

  initial begin
    real g [M];
    g[0] = K_GAIN ** -3; g[1] = K_GAIN ** -3; g[2] = K_GAIN ** -2; g[3] = K_GAIN ** -1;
    rst_n = 1'b0; in_tag = '0;
    foreach (in_row[r]) in_row[r] = '0;
    for (int t = 0; t < NMAT; t++) begin
      for (int i = 0; i < M; i++) for (int j = 0; j < N; j++)
        a[t][i][j] = real'(int'($urandom_range(0, 200000)) - 100000) / ONE;   // |a| < 0.77
      reference(t);
    end
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int t = 0; t < NMAT; t++)
      for (int j = 0; j < N; j++) begin
        @(negedge clk);
        for (int i = 0; i < M; i++) in_row[i] = W'(int'(a[t][i][j] * g[i] * ONE));
        in_tag = '{valid: 1'b1, col: COLW'(j)};
        if ($urandom_range(0, 3) == 0) begin @(negedge clk); in_tag = '0; end
      end
    @(negedge clk); in_tag = '0;
  end

  always @(posedge clk) begin
    if (rst_n && in_tag.valid) tin.push_back(cyc);
    if (rst_n && out_tag.valid) begin
      int mt, cl, e;
      mt = got / N; cl = got % N;
      e = int'(real'(out_r) - rr[mt][0][cl] * ONE);
      checks++;
      if (e > TOL || e < -TOL) begin
        failures++;
        if (failures < 10) $display("m%0d r(0,%0d) = %0d expected %f", mt, cl, out_r, rr[mt][0][cl] * ONE);
      end
      if (cl > 0)
        for (int j = 1; j < M; j++) begin
          e = int'(real'(out_next[j-1]) - rr[mt][j][cl] * K_GAIN ** (j - 3) * ONE);
          checks++;
          if (e > TOL || e < -TOL) begin
            failures++;
            if (failures < 10) $display("m%0d next row %0d col %0d = %0d expected %f", mt, j, cl,
                                        out_next[j-1], rr[mt][j][cl] * K_GAIN ** (j - 3) * ONE);
          end
        end
      checks += 2;
      if (int'(out_tag.col) != cl) failures++;
      if (cyc - tin.pop_front() != 3 * (NITER + 1)) failures++;
      got++;
      if (got == NMAT * N) begin
        checks++;
        if (nneg == 0) failures++;
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end

  initial begin
    repeat (NMAT * N * 3 + 300) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
