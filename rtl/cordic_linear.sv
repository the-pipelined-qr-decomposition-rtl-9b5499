// cordic_linear: pipelined CORDIC in linear rotation mode (mu = 0,
// d_i = sign(z_i), e_i = 2^-i). Starting from y = 0 it computes
//   y_{i+1} = y_i + d_i * x * 2^-i,   z_{i+1} = z_i - d_i * 2^-i
// for i = IMIN .. FRAC+GY, so y converges to x * z with only shifts and
// add/subtract operations. This is how the pre- and post-processing scale
// matrix elements by powers of K. A negative IMIN (left shifts) lets z exceed
// 2; the iterations cover |z| < 2^(1-IMIN).
//
// x and y are W-bit two's complement numbers with FRAC fraction bits; z has
// FRAC+GY fraction bits and enough integer bits for the range. Internally x
// and y carry GY extra fraction bits, so that a small factor z keeps its
// relative precision, and 2 - IMIN extra integer bits for the partial sums;
// y is rounded to FRAC fraction bits and cut to W bits at the output, so the
// product itself must fit in W bits. One iteration per pipeline stage (one
// add/subtract delay per clock): the latency is FRAC + GY - IMIN + 1 cycles
// and one word is accepted every clock. The tag moves with the data.
// The iteration range, the guard bits and the truncating shifts are this
// design's choices.
module cordic_linear
  import qr_pkg::*;
#(
  parameter int          W    = 14,
  parameter int          FRAC = 11,
  parameter int          IMIN = 0,
  parameter int          GY   = 2,
  parameter adder_arch_e ARCH = ADD_CLA,
  localparam int         IMAX = FRAC + GY,
  localparam int         ZW   = IMAX + 2 - IMIN,   // z width
  localparam int         NIT  = IMAX - IMIN + 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  tag_t                 in_tag,
  input  logic signed [W-1:0]  in_x,
  input  logic signed [ZW-1:0] in_z,
  output tag_t                 out_tag,
  output logic signed [W-1:0]  out_y
);
  localparam int YW = W + GY + 2 - IMIN;   // internal x/y width

  tag_t                 tag_q [NIT+1];
  logic signed [YW-1:0] x_q   [NIT+1];
  logic signed [YW-1:0] y_q   [NIT+1];
  logic signed [ZW-1:0] z_q   [NIT+1];

  assign tag_q[0] = in_tag;
  assign x_q[0]   = YW'(in_x) <<< GY;
  assign y_q[0]   = '0;
  assign z_q[0]   = in_z;

  for (genvar k = 0; k < NIT; k++) begin : g_it
    localparam int I = IMIN + k;     // iteration index
    logic signed [YW-1:0] xs, yn;
    logic [ZW-1:0]        zn;
    logic                 dneg;      // d_i = -1
    if (I < 0) begin : g_l
      assign xs = x_q[k] <<< (-I);
    end else begin : g_r
      assign xs = x_q[k] >>> I;
    end
    assign dneg = z_q[k][ZW-1];
    // d = +1: y + x*2^-i, z - 2^-i ;  d = -1: y - x*2^-i, z + 2^-i
    addsub #(.W(YW), .ARCH(ARCH)) u_y (.a(y_q[k]), .b(xs), .sub(dneg), .y(yn));
    addsub #(.W(ZW), .ARCH(ARCH)) u_z (.a(z_q[k]), .b(ZW'(1) << (IMAX - I)), .sub(~dneg), .y(zn));

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) tag_q[k+1] <= '0;
      else        tag_q[k+1] <= tag_q[k];
    end
    always_ff @(posedge clk) begin
      x_q[k+1] <= x_q[k];
      y_q[k+1] <= yn;
      z_q[k+1] <= zn;
    end
  end

  assign out_tag = tag_q[NIT];
  // round to nearest: add half an output LSB, drop the guard bits
  logic signed [YW-1:0] y_rnd;
  assign y_rnd = (y_q[NIT] + (YW'(1) <<< (GY - 1))) >>> GY;
  assign out_y = y_rnd[W-1:0];
endmodule
