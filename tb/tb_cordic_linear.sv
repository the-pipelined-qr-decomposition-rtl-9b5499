// tb_cordic_linear: drives two linear-rotation CORDIC multipliers one word
// per clock: the default one (14-bit, 11 fraction bits, |z| < 2) and one with
// IMIN = -2 and 5 guard bits (|z| < 8, as used for K^3 and K^-6). Each output
// y is compared with the real product x*z (tolerance 2 LSB) and must appear
// exactly FRAC + GY - IMIN + 1 cycles after its input, tag included.
module tb_cordic_linear;
  import qr_pkg::*;
  localparam int W = 14, FRAC = 11;
  localparam int NT = 250;
  localparam int TOL = 2;

  logic clk = 1'b0, rst_n;
  tag_t in_tag, out_a_tag, out_b_tag;
  logic signed [W-1:0] x, ya, yb;
  logic signed [FRAC+3:0] za;            // default: ZW = FRAC + 2 + 2
  logic signed [FRAC+5+4:0] zb;          // GY = 5, IMIN = -2: ZW = FRAC + 5 + 4

  cordic_linear #(.W(W), .FRAC(FRAC)) dut_a (
    .clk, .rst_n, .in_tag, .in_x(x), .in_z(za), .out_tag(out_a_tag), .out_y(ya));
  cordic_linear #(.W(W), .FRAC(FRAC), .IMIN(-2), .GY(5)) dut_b (
    .clk, .rst_n, .in_tag, .in_x(x), .in_z(zb), .out_tag(out_b_tag), .out_y(yb));

  always #5 clk = ~clk;

  real exp_a [NT], exp_b [NT];
  int  checks = 0, failures = 0, sent = 0, ga = 0, gb = 0, cyc = 0;
  int  t_in [NT];

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    rst_n = 1'b0; in_tag = '0; x = '0; za = '0; zb = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int t = 0; t < NT; t++) begin
      int xi, zai, zbi;
      xi  = int'($urandom_range(0, 3800)) - 1900;                     // |x| < 0.93
      zai = int'($urandom_range(0, 2 * 15000)) - 15000;               // |z| < 1.84, 13 frac bits
      zbi = int'($urandom_range(0, 2 * 230000)) - 230000;             // |z| < 3.6, 16 frac bits
      if (t == 0) zbi = int'(kpow(3) * 65536.0);
      if (t == 1) zbi = int'(kpow(-6) * 65536.0);
      @(negedge clk);
      x  = W'(xi); za = (FRAC+4)'(zai); zb = (FRAC+10)'(zbi);
      in_tag = '{valid: 1'b1, col: COLW'(t)};
      exp_a[t] = real'(xi) * real'(zai) / 8192.0;
      exp_b[t] = real'(xi) * real'(zbi) / 65536.0;
      if ($urandom_range(0, 3) == 0) begin
        @(negedge clk); in_tag = '0;   // bubble
      end
    end
    @(negedge clk); in_tag = '0;
  end

  always @(posedge clk) begin
    if (in_tag.valid) t_in[in_tag.col] <= cyc;
    if (rst_n && out_a_tag.valid) begin
      int e;
      e = int'(real'(ya) - exp_a[ga]);
      checks += 3;
      if (e > TOL || e < -TOL) begin failures++; $display("a: #%0d y=%0d exp %f", ga, ya, exp_a[ga]); end
      if (int'(out_a_tag.col) != (ga % 256)) failures++;
      if (cyc - t_in[ga] != FRAC + 2 + 1) begin failures++; $display("a: latency %0d", cyc - t_in[ga]); end
      ga++;
    end
    if (rst_n && out_b_tag.valid) begin
      int e;
      e = int'(real'(yb) - exp_b[gb]);
      checks += 2;
      if (e > TOL || e < -TOL) begin failures++; $display("b: #%0d y=%0d exp %f", gb, yb, exp_b[gb]); end
      if (cyc - t_in[gb] != FRAC + 5 + 2 + 1) begin failures++; $display("b: latency %0d", cyc - t_in[gb]); end
      gb++;
    end
    if (ga == NT && gb == NT) begin
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
