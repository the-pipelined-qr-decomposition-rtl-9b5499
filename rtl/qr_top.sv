// qr_top: pipelined QR decomposition of M x N matrices (M >= N) by Givens
// rotations computed with CORDIC, default 4 x 4 with 14-bit data.
//
// A matrix enters one column per clock: in_col[m] = a(m,n), n = 0..N-1 in
// consecutive valid cycles (bubbles between columns and matrices are
// allowed; every N valid columns form one matrix). Numbers are W-bit two's
// complement with FRAC fraction bits; inputs must satisfy |a| < 1 so that R
// (|r| <= sqrt(M)) fits. The upper-triangular R leaves one column per clock,
// out_r[k] = r(k,n) for k = 0..N-1, with out_valid and out_colidx, a fixed
// LATENCY cycles after the column entered; a new matrix can follow every N
// clocks. Diagonal entries r(k,k), k < M-1, are non-negative.
//
// Structure: N cascaded qr_stage pipelines, stage s producing R row s and
// handing the remaining rows to stage s+1; each R row is then delayed so that
// all rows leave together. The stage structure, the CORDIC pre-/post-scaling
// and the adder choice follow the design description; streaming a column per
// clock with a column tag, the quadrant step, the widths and the exact scaling
// exponents are this design's choices.
module qr_top
  import qr_pkg::*;
#(
  parameter int          W     = 14,
  parameter int          FRAC  = 11,
  parameter int          GUARD = 6,
  parameter int          NITER = 18,
  parameter int          M     = 4,
  parameter int          N     = 4,
  parameter adder_arch_e ARCH  = ADD_CLA
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] in_col     [M],
  output logic                out_valid,
  output logic [COLW-1:0]     out_colidx,
  output logic signed [W-1:0] out_r      [N]
);
  // Internal word: GUARD extra fraction bits against the precision lost to
  // the down-scaling of the pre-processing.
  localparam int WD = W + GUARD;
  localparam int FD = FRAC + GUARD;

  // Time from a column entering to the same column of R leaving.
  function automatic int max_done();
    int t;
    t = 0;
    for (int s = 0; s < N; s++) if (row_done(M, s, FD, NITER) > t) t = row_done(M, s, FD, NITER);
    return t;
  endfunction
  localparam int LATENCY = max_done();

  // ---- column counter and input tag -----------------------------------------
  logic [COLW-1:0] col_q;
  tag_t            in_tag;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                 col_q <= '0;
    else if (in_valid && col_q == COLW'(N - 1)) col_q <= '0;
    else if (in_valid)                          col_q <= col_q + 1'b1;
  end
  assign in_tag = '{valid: in_valid, col: col_q};

  // ---- cascaded stages ------------------------------------------------------
  for (genvar s = 0; s < N; s++) begin : g_st
    localparam int ROWS  = M - s;
    localparam int NNEXT = (ROWS > 1) ? ROWS - 1 : 1;
    tag_t                st_tag;
    logic signed [WD-1:0] st_row  [ROWS];
    tag_t                 r_tag, next_tag;
    logic signed [WD-1:0] r, r_al;
    logic signed [WD-1:0] next_row [NNEXT];

    if (s == 0) begin : g_in
      assign st_tag = in_tag;
      for (genvar k = 0; k < ROWS; k++) begin : g_k
        assign st_row[k] = WD'(in_col[k]) <<< GUARD;
      end
    end else begin : g_chain
      assign st_tag = g_st[s-1].next_tag;
      for (genvar k = 0; k < ROWS; k++) begin : g_k
        assign st_row[k] = g_st[s-1].next_row[k];
      end
    end

    qr_stage #(.W(WD), .FRAC(FD), .NITER(NITER), .M(M), .S(s), .ARCH(ARCH)) u_stage (
      .clk, .rst_n, .in_tag(st_tag), .in_row(st_row),
      .r_tag, .out_r(r), .next_tag, .out_next(next_row));

    // align R row s with the slowest row
    delay_line #(.W(WD), .D(LATENCY - row_done(M, s, FD, NITER))) u_align (
      .clk, .rst_n, .din(r), .dout(r_al));
    // round away the guard bits
    if (GUARD == 0) begin : g_ng
      assign out_r[s] = r_al;
    end else begin : g_rnd
      logic signed [WD-1:0] r_rnd;
      assign r_rnd    = (r_al + (WD'(1) <<< (GUARD - 1))) >>> GUARD;
      assign out_r[s] = r_rnd[W-1:0];
    end
  end

  // ---- output tag -----------------------------------------------------------
  tag_t out_tag;
  delay_line #(.W($bits(tag_t)), .D(LATENCY)) u_tag (
    .clk, .rst_n, .din(in_tag), .dout(out_tag));
  assign out_valid  = out_tag.valid;
  assign out_colidx = out_tag.col;

  // ---- interface rules ------------------------------------------------------
  initial assert (M >= N && N >= 1 && M >= 2) else $error("qr_top needs M >= N >= 1, M >= 2");
  for (genvar m = 0; m < M; m++) begin : g_chk
    // |a| < 1: the integer bits above the fraction are all sign
    a_range: assert property (@(posedge clk) disable iff (!rst_n)
      in_valid |-> (in_col[m][W-1:FRAC] == '0 || in_col[m][W-1:FRAC] == '1));
  end
endmodule
