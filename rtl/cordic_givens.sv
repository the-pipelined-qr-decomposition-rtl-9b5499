// cordic_givens: pipelined circular CORDIC (mu = 1, e_i = atan 2^-i) that
// applies one Givens rotation to a pair of matrix rows streamed element by
// element. For the leading element of the pair (in_lead = 1) it works in
// vectoring mode, d_i = -sign(x_i * y_i): the vector is turned onto the x
// axis, x becomes K*sqrt(x^2 + y^2) and y about 0. Each stage stores its d_i.
// For the following elements of the same pair (in_lead = 0) it works in
// rotation mode with the stored d_i, i.e. it turns them by the same angle.
//   x_{i+1} = x_i - d_i * y_i * 2^-i,   y_{i+1} = y_i + d_i * x_i * 2^-i
// The angle itself (z) is never needed, so it is not computed.
//
// Stage 0 is a quadrant step: vectoring converges only for x >= 0, so if the
// leading x is negative both rows are negated (a rotation by pi) and the
// decision is stored for the followers. Then NITER iterations follow, one
// per pipeline stage, so the latency is NITER + 1 cycles and one element pair
// is accepted every clock; the tag and lead flag move with the data. Data are
// W-bit two's complement, carried internally with one guard bit; the output
// magnitudes must fit in W bits. Both outputs are stretched by K.
// The quadrant step, the iteration count and the guard bit are this
// design's choices.
module cordic_givens
  import qr_pkg::*;
#(
  parameter int          W     = 14,
  parameter int          NITER = 12,
  parameter adder_arch_e ARCH  = ADD_CLA
) (
  input  logic                clk,
  input  logic                rst_n,
  input  tag_t                in_tag,
  input  logic                in_lead,
  input  logic signed [W-1:0] in_x,
  input  logic signed [W-1:0] in_y,
  output tag_t                out_tag,
  output logic                out_lead,
  output logic signed [W-1:0] out_x,
  output logic signed [W-1:0] out_y
);
  localparam int XW = W + 1;

  tag_t                 tag_q  [NITER+1];
  logic                 lead_q [NITER+1];
  logic signed [XW-1:0] x_q    [NITER+1];
  logic signed [XW-1:0] y_q    [NITER+1];

  // ---- stage 0: quadrant step ---------------------------------------------
  logic neg_q;     // negation decided by the last leading element
  logic neg;
  logic in_lead_v;
  assign in_lead_v = in_lead & in_tag.valid;
  assign neg       = in_lead_v ? in_x[W-1] : neg_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      neg_q     <= 1'b0;
      tag_q[0]  <= '0;
      lead_q[0] <= 1'b0;
    end else begin
      if (in_lead_v) neg_q <= in_x[W-1];
      tag_q[0]  <= in_tag;
      lead_q[0] <= in_lead_v;
    end
  end
  always_ff @(posedge clk) begin
    x_q[0] <= neg ? -XW'(in_x) : XW'(in_x);
    y_q[0] <= neg ? -XW'(in_y) : XW'(in_y);
  end

  // ---- iterations ---------------------------------------------------------
  for (genvar i = 0; i < NITER; i++) begin : g_it
    logic dneg_q;                 // stored direction: d_i = -1
    logic dneg;
    logic signed [XW-1:0] xs, ys, xn, yn;
    // vectoring: d_i = -sign(x*y) with x >= 0, i.e. d_i = -1 when y >= 0
    assign dneg = lead_q[i] ? ~y_q[i][XW-1] : dneg_q;
    assign xs   = x_q[i] >>> i;
    assign ys   = y_q[i] >>> i;
    // d = +1: x - y*2^-i, y + x*2^-i ;  d = -1: x + y*2^-i, y - x*2^-i
    addsub #(.W(XW), .ARCH(ARCH)) u_x (.a(x_q[i]), .b(ys), .sub(~dneg), .y(xn));
    addsub #(.W(XW), .ARCH(ARCH)) u_y (.a(y_q[i]), .b(xs), .sub(dneg),  .y(yn));

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        dneg_q      <= 1'b0;
        tag_q[i+1]  <= '0;
        lead_q[i+1] <= 1'b0;
      end else begin
        if (lead_q[i]) dneg_q <= dneg;
        tag_q[i+1]  <= tag_q[i];
        lead_q[i+1] <= lead_q[i];
      end
    end
    always_ff @(posedge clk) begin
      x_q[i+1] <= xn;
      y_q[i+1] <= yn;
    end
  end

  assign out_tag  = tag_q[NITER];
  assign out_lead = lead_q[NITER];
  assign out_x    = x_q[NITER][W-1:0];
  assign out_y    = y_q[NITER][W-1:0];
endmodule
