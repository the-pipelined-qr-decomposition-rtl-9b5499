// qr_stage: one row pipeline of the QR array, producing R row S
// (PreProc -> Proc -> PostProc). It receives rows S..M-1 of the partly
// reduced matrix as parallel streams, one column per clock, tagged with the
// column index; column S is the leading element whose Givens angles are
// found by vectoring.
//   - out_r / r_tag : R row S, pre_latency + proc_latency + post_latency
//                     cycles after the input, zero left of the diagonal
//   - out_next / next_tag : rows S+1..M-1 with column S eliminated, for
//                     stage S+1, pre_latency + proc_latency cycles after the
//                     input (before the post-processing)
// When only one row is left (last stage of a square matrix) there is nothing
// to rotate: the row is pre-scaled and passed on as R row S, and out_next is
// driven to zero.
module qr_stage
  import qr_pkg::*;
#(
  parameter int          W     = 14,
  parameter int          FRAC  = 11,
  parameter int          NITER = 12,
  parameter int          M     = 4,
  parameter int          S     = 0,
  parameter adder_arch_e ARCH  = ADD_CLA,
  localparam int         ROWS  = M - S,
  localparam int         NNEXT = (ROWS > 1) ? ROWS - 1 : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  tag_t                in_tag,
  input  logic signed [W-1:0] in_row   [ROWS],
  output tag_t                r_tag,
  output logic signed [W-1:0] out_r,
  output tag_t                next_tag,
  output logic signed [W-1:0] out_next [NNEXT]
);
  tag_t                pre_tag, piv_tag;
  logic signed [W-1:0] pre_row [ROWS];
  logic signed [W-1:0] piv;

  pre_proc #(.W(W), .FRAC(FRAC), .M(M), .S(S), .ARCH(ARCH)) u_pre (
    .clk, .rst_n, .in_tag, .in_row, .out_tag(pre_tag), .out_row(pre_row));

  if (ROWS > 1) begin : g_proc
    givens_proc #(.W(W), .NITER(NITER), .M(M), .S(S), .ARCH(ARCH)) u_proc (
      .clk, .rst_n, .in_tag(pre_tag), .in_row(pre_row),
      .out_tag(piv_tag), .out_r(piv), .out_next(out_next));
    assign next_tag = piv_tag;
  end else begin : g_last
    assign piv_tag     = pre_tag;
    assign piv         = pre_row[0];
    assign next_tag    = '0;
    assign out_next[0] = '0;
  end

  post_proc #(.W(W), .FRAC(FRAC), .M(M), .S(S), .ARCH(ARCH)) u_post (
    .clk, .rst_n, .in_tag(piv_tag), .in_r(piv), .out_tag(r_tag), .out_r(out_r));
endmodule
