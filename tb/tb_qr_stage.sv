// tb_qr_stage: checks two row pipelines of a 4 x 4 QR array (20-bit words,
// 17 fraction bits, 18 iterations), fed with random matrices one column per
// clock with bubbles:
//  - stage 0 with raw input rows: R row 0 must equal the first row of a real
//    Givens reduction (pivot row 0 against rows 1, 2, 3) after 25 + 57 + 22
//    = 104 cycles; the rows handed on must be the rotated rows 1..3 with
//    gains K^-5, K^-4, K^-3 (columns 1..3) after 25 + 57 = 82 cycles;
//  - stage 3 (one row left): R row 3 is the row times K, zero in
//    columns 0..2, after 20 cycles.
// Tolerance 400 LSB (about three LSB at 11 fraction bits; truncating CORDIC shifts, amplified by the K^-6 down-scaling).
module tb_qr_stage;
  import qr_pkg::*;
  localparam int W = 20, FRAC = 17, NITER = 18, M = 4, N = 4;
  localparam int NMAT = 100, TOL = 400;  // about three LSB of a 14-bit word with 11 fraction bits
  localparam real ONE = 131072.0;

  logic clk = 1'b0, rst_n;
  tag_t in_tag, r_tag, next_tag, r3_tag, n3_tag;
  logic signed [W-1:0] in_row [M], out_r, out_next [M-1];
  logic signed [W-1:0] in3 [1], out_r3, out_n3 [1];

  qr_stage #(.W(W), .FRAC(FRAC), .NITER(NITER), .M(M), .S(0)) dut (
    .clk, .rst_n, .in_tag, .in_row, .r_tag, .out_r, .next_tag, .out_next);
  qr_stage #(.W(W), .FRAC(FRAC), .NITER(NITER), .M(M), .S(3)) dut3 (
    .clk, .rst_n, .in_tag, .in_row(in3), .r_tag(r3_tag), .out_r(out_r3),
    .next_tag(n3_tag), .out_next(out_n3));

  always #5 clk = ~clk;

  real a [NMAT][M][N], rr [NMAT][M][N];
  int  tin_r [$], tin_n [$], tin_3 [$];
  int  checks = 0, failures = 0, got_r = 0, got_n = 0, got_3 = 0, cyc = 0;

  always @(posedge clk) cyc <= cyc + 1;

  task automatic reference(input int t);
    real w [M][N];
    real c, s, h, p, q;
    for (int i = 0; i < M; i++) for (int j = 0; j < N; j++) w[i][j] = a[t][i][j];
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

  task automatic chk(input string nm, input int got, input real expv);
    int e;
    e = int'(real'(got) - expv);
    checks++;
    if (e > TOL || e < -TOL) begin
      failures++;
      if (failures < 10) $display("%s = %0d expected %f", nm, got, expv);
    end
  endtask

  initial begin
    rst_n = 1'b0; in_tag = '0; in3[0] = '0;
    foreach (in_row[r]) in_row[r] = '0;
    for (int t = 0; t < NMAT; t++) begin
      for (int i = 0; i < M; i++) for (int j = 0; j < N; j++)
        a[t][i][j] = real'(int'($urandom_range(0, 230000)) - 115000) / ONE;   // |a| < 0.88
      reference(t);
    end
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int t = 0; t < NMAT; t++)
      for (int j = 0; j < N; j++) begin
        @(negedge clk);
        for (int i = 0; i < M; i++) in_row[i] = W'(int'(a[t][i][j] * ONE));
        in3[0] = W'(int'(a[t][3][j] * ONE * 0.5));
        in_tag = '{valid: 1'b1, col: COLW'(j)};
        if ($urandom_range(0, 3) == 0) begin @(negedge clk); in_tag = '0; end
      end
    @(negedge clk); in_tag = '0;
  end

  always @(posedge clk) begin
    if (rst_n && in_tag.valid) begin tin_r.push_back(cyc); tin_n.push_back(cyc); tin_3.push_back(cyc); end
    if (rst_n && r_tag.valid) begin
      chk($sformatf("m%0d r(0,%0d)", got_r / N, got_r % N), int'(out_r), rr[got_r / N][0][got_r % N] * ONE);
      checks++;
      if (cyc - tin_r.pop_front() != 104) failures++;
      got_r++;
    end
    if (rst_n && next_tag.valid) begin
      if (got_n % N > 0)
        for (int j = 1; j < M; j++)
          chk($sformatf("m%0d next%0d col %0d", got_n / N, j, got_n % N), int'(out_next[j-1]),
              rr[got_n / N][j][got_n % N] * K_GAIN ** (j - 6) * ONE);
      checks++;
      if (cyc - tin_n.pop_front() != 82) failures++;
      got_n++;
    end
    if (rst_n && r3_tag.valid) begin
      chk($sformatf("m%0d r3 col %0d", got_3 / N, got_3 % N), int'(out_r3),
          (got_3 % N < 3) ? 0.0 : real'(int'(a[got_3 / N][3][got_3 % N] * ONE * 0.5)) * K_GAIN);
      checks++;
      if (cyc - tin_3.pop_front() != 20) failures++;
      got_3++;
    end
    if (got_r == NMAT * N && got_n == NMAT * N && got_3 == NMAT * N) begin
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
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
