// givens_proc: rotation chain of pipeline stage S ("Proc"). Stage S receives
// rows S..M-1 of the partly reduced matrix (local row 0 is the pivot) as
// parallel streams, one column per clock. The pivot is rotated in turn
// against every other row j = 1..ROWS-1 by a cordic_givens unit: the element
// of column S (the leading one) is vectored, which zeroes row j's entry in
// that column, and the remaining columns are rotated by the same angle.
// Partner row j is delayed by (j-1) CORDIC latencies so that it meets the
// pivot at unit j. After the last unit the pivot is R row S (still stretched);
// the rotated partner rows, whose column S is now zero, are re-aligned with
// delays and handed to stage S+1 as its rows.
// Latency proc_latency(M,S,NITER) = (ROWS-1)*(NITER+1) cycles for both
// outputs. Needs at least two rows.
module givens_proc
  import qr_pkg::*;
#(
  parameter int          W     = 14,
  parameter int          NITER = 12,
  parameter int          M     = 4,
  parameter int          S     = 0,
  parameter adder_arch_e ARCH  = ADD_CLA,
  localparam int         ROWS  = M - S,
  localparam int         NROT  = ROWS - 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  tag_t                in_tag,
  input  logic signed [W-1:0] in_row   [ROWS],
  output tag_t                out_tag,
  output logic signed [W-1:0] out_r,
  output logic signed [W-1:0] out_next [NROT]
);
  localparam int LC = givens_latency(NITER);

  tag_t                piv_tag  [NROT+1];
  logic                piv_lead [NROT+1];
  logic signed [W-1:0] piv      [NROT+1];

  assign piv_tag[0]  = in_tag;
  assign piv_lead[0] = in_tag.valid && (in_tag.col == COLW'(S));
  assign piv[0]      = in_row[0];

  for (genvar j = 1; j <= NROT; j++) begin : g_rot
    logic signed [W-1:0] partner, yo;
    delay_line #(.W(W), .D((j - 1) * LC)) u_skew (
      .clk, .rst_n, .din(in_row[j]), .dout(partner));
    cordic_givens #(.W(W), .NITER(NITER), .ARCH(ARCH)) u_cordic (
      .clk, .rst_n,
      .in_tag(piv_tag[j-1]), .in_lead(piv_lead[j-1]), .in_x(piv[j-1]), .in_y(partner),
      .out_tag(piv_tag[j]), .out_lead(piv_lead[j]), .out_x(piv[j]), .out_y(yo));
    delay_line #(.W(W), .D((NROT - j) * LC)) u_align (
      .clk, .rst_n, .din(yo), .dout(out_next[j-1]));
  end

  assign out_tag = piv_tag[NROT];
  assign out_r   = piv[NROT];

  // The rotations assume each element pair leaves in the order it entered.
  initial assert (NROT >= 1) else $error("givens_proc needs at least two rows");
endmodule
