// tb_qr_top: end-to-end test of the QR decomposition at its default size
// (4 x 4, 14-bit data, 11 fraction bits, 6 internal guard bits, 18 CORDIC
// iterations, carry look-ahead adders). Random matrices with entries in (-1, 1) are streamed in
// one column per clock, with random bubbles inside and between matrices and
// runs of back-to-back matrices. Every column of R is compared with a
// double-precision reference R computed here by Givens rotations (pivot row
// k rotated against rows k+1..M-1, non-negative diagonal except the last
// row), which is unique for a full-rank matrix. The tolerance is TOL LSBs.
// The test also checks the fixed latency from a column entering to its R
// column leaving, and counts how often each mechanism of the design was used:
// vectoring/rotation mode switches, quadrant (negative pivot) steps, bubbles
// and back-to-back matrices.
module tb_qr_top;
  import qr_pkg::*;

  localparam int W     = 14;
  localparam int FRAC  = 11;
  localparam int NITER = 18;
  localparam int GUARD = 6;
  localparam int M     = 4;
  localparam int N     = 4;
  localparam int NMAT  = 300;
  localparam int TOL   = 40;       // LSBs of 2^-FRAC, worst single entry
  localparam real MEAN_TOL = 1.5;  // LSBs, mean over all entries

  logic clk = 1'b0;
  logic rst_n;
  logic in_valid;
  logic signed [W-1:0] in_col [M];
  logic out_valid;
  logic [COLW-1:0] out_colidx;
  logic signed [W-1:0] out_r [N];

  qr_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // stimulus and reference storage
  real a_q   [NMAT][M][N];   // quantised inputs
  real r_ref [NMAT][N][N];
  int  in_cycle [NMAT][N];
  int  n_quadrant = 0, n_bubble = 0, n_b2b = 0, n_lead = 0, n_follow = 0;
  int  max_err = 0;
  longint sum_err = 0;

  // expected latency, from the stage structure (internal fraction bits
  // FD = FRAC + GUARD): a linear CORDIC scaling by K^e runs from iteration
  // -floor(e*log2 K) (e > 0) or 0 to FD + g + 2, g = ceil(-e*log2 K) for e < 0;
  // stage 0 scales its rows by K^-2(M-1) .. K^-M, later stages their pivot by
  // K; a rotation takes NITER + 1 cycles; R row s is scaled by K^(M-1-s).
  function automatic int lin_lat(int e);
    real l2;
    l2 = e * $ln(K_GAIN) / $ln(2.0);
    if (e > 0) return FRAC + GUARD + 2 + int'($floor(l2)) + 1;
    return FRAC + GUARD + 2 + int'($ceil(-l2)) + 1;
  endfunction

  function automatic int exp_latency();
    int t, best, post, pre;
    t = 0; best = 0;
    for (int s = 0; s < N; s++) begin
      pre = (s == 0) ? lin_lat(-2 * (M - 1)) : lin_lat(1);
      t += pre + (M - 1 - s) * (NITER + 1);
      post = (M - 1 - s == 0) ? 0 : lin_lat(M - 1 - s);
      if (t + post > best) best = t + post;
    end
    return best;
  endfunction

  task automatic reference(input int idx);
    real w [M][N];
    real c, s, h, p, q;
    for (int i = 0; i < M; i++) for (int j = 0; j < N; j++) w[i][j] = a_q[idx][i][j];
    for (int k = 0; k < N; k++) begin
      if (k < M - 1 && w[k][k] < 0.0) n_quadrant++;
      for (int j = k + 1; j < M; j++) begin
        h = $sqrt(w[k][k] * w[k][k] + w[j][k] * w[j][k]);
        c = (h == 0.0) ? 1.0 : w[k][k] / h;
        s = (h == 0.0) ? 0.0 : w[j][k] / h;
        for (int n = k; n < N; n++) begin
          p = w[k][n]; q = w[j][n];
          w[k][n] =  c * p + s * q;
          w[j][n] = -s * p + c * q;
        end
      end
    end
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) r_ref[idx][i][j] = (j < i) ? 0.0 : w[i][j];
  endtask

  // ---- driver -----------------------------------------------------------------
  initial begin
    rst_n = 1'b0; in_valid = 1'b0;
    for (int m = 0; m < M; m++) in_col[m] = '0;
    for (int t = 0; t < NMAT; t++)
      for (int i = 0; i < M; i++)
        for (int j = 0; j < N; j++) begin
          int v;
          v = int'($urandom_range(0, 2 * 1843)) - 1843;   // |a| < 0.9
          a_q[t][i][j] = real'(v) / real'(1 << FRAC);
        end
    for (int t = 0; t < NMAT; t++) reference(t);
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int t = 0; t < NMAT; t++) begin
      // between matrices: none in the second half of the run, else random
      if (t > 0 && t < NMAT / 2 && $urandom_range(0, 1) == 1) begin
        in_valid <= 1'b0;
        repeat ($urandom_range(1, 3)) @(posedge clk);
      end else if (t > 0) n_b2b++;
      for (int j = 0; j < N; j++) begin
        if (j > 0 && t < NMAT / 2 && $urandom_range(0, 3) == 0) begin
          in_valid <= 1'b0;
          n_bubble++;
          @(posedge clk);
        end
        in_valid <= 1'b1;
        for (int i = 0; i < M; i++) in_col[i] <= W'(int'(a_q[t][i][j] * real'(1 << FRAC)));
        in_cycle[t][j] = cyc;
        @(posedge clk);
      end
    end
    in_valid <= 1'b0;
  end

  // count vectoring and rotation passes in the first Givens unit
  always @(posedge clk)
    if (rst_n && dut.g_st[0].u_stage.g_proc.u_proc.g_rot[1].u_cordic.in_tag.valid) begin
      if (dut.g_st[0].u_stage.g_proc.u_proc.g_rot[1].u_cordic.in_lead) n_lead++;
      else n_follow++;
    end

  // ---- checker -------------------------------------------------------------
  int got_mat = 0, got_col = 0;
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      checks++;
      if (int'(out_colidx) != got_col) begin
        failures++;
        $display("column index %0d, expected %0d", out_colidx, got_col);
      end
      checks++;
      if (cyc - 1 - in_cycle[got_mat][got_col] != exp_latency()) begin
        failures++;
        $display("latency %0d, expected %0d", cyc - 1 - in_cycle[got_mat][got_col], exp_latency());
      end
      for (int k = 0; k < N; k++) begin
        int e;
        e = int'(real'(out_r[k]) - r_ref[got_mat][k][got_col] * real'(1 << FRAC));
        if (e < 0) e = -e;
        if (e > max_err) max_err = e;
        sum_err += e;
        checks++;
        if (e > TOL) begin
          failures++;
          if (e > 200)
            $display("matrix %0d r(%0d,%0d) = %f, expected %f", got_mat, k, got_col,
                     real'(out_r[k]) / real'(1 << FRAC), r_ref[got_mat][k][got_col]);
        end
      end
      if (got_col == N - 1) begin got_col = 0; got_mat++; end
      else got_col++;
      if (got_mat == NMAT) finish_test();
    end
  end

  task automatic finish_test();
    $display("latency %0d", exp_latency());
    $display("mean error %f LSB", real'(sum_err) / real'(NMAT * N * N));
    $display("max error %0d LSB; quadrant steps %0d, bubbles %0d, back-to-back %0d, vectoring %0d, rotation %0d",
             max_err, n_quadrant, n_bubble, n_b2b, n_lead, n_follow);
    checks += 6;
    if (real'(sum_err) / real'(NMAT * N * N) > MEAN_TOL) failures++;
    if (n_quadrant == 0) failures++;
    if (n_bubble == 0)   failures++;
    if (n_b2b == 0)      failures++;
    if (n_lead == 0)     failures++;
    if (n_follow == 0)   failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  // watchdog
  initial begin
    repeat (NMAT * N * 3 + 1000) @(posedge clk);
    failures++;
    $display("watchdog: only %0d matrices received", got_mat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
