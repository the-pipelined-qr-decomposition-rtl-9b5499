// post_proc: post-processing of pipeline stage S ("PostProc"). The finished
// R row s leaves the rotation chain stretched by K^-(M-1-S); a linear-mode
// CORDIC multiplies it by K^(M-1-S), i.e. applies row S of
// S' = diag(K^(M-1), ..., K^0). Elements left of the diagonal (column < S)
// are forced to zero, giving the upper-triangular R. With the factor K^0
// (the last row) no CORDIC is needed and only the masking remains.
// Latency post_latency(M,S,FRAC) cycles, one element per clock.
module post_proc
  import qr_pkg::*;
#(
  parameter int          W    = 14,
  parameter int          FRAC = 11,
  parameter int          M    = 4,
  parameter int          S    = 0,
  parameter adder_arch_e ARCH = ADD_CLA
) (
  input  logic                clk,
  input  logic                rst_n,
  input  tag_t                in_tag,
  input  logic signed [W-1:0] in_r,
  output tag_t                out_tag,
  output logic signed [W-1:0] out_r
);
  localparam int E = post_exp(M, S);
  logic signed [W-1:0] y;

  if (E == 0) begin : g_none
    assign out_tag = in_tag;
    assign y       = in_r;
  end else begin : g_scale
    localparam int IMIN = lin_imin(E);
    localparam int GY   = lin_guard(E);
    localparam int ZW   = FRAC + GY + 2 - IMIN;
    localparam logic signed [ZW-1:0] ZK = ZW'(kfix(E, FRAC + GY));
    cordic_linear #(.W(W), .FRAC(FRAC), .IMIN(IMIN), .GY(GY), .ARCH(ARCH)) u_mul (
      .clk, .rst_n, .in_tag, .in_x(in_r), .in_z(ZK), .out_tag, .out_y(y));
  end

  if (S == 0) begin : g_nomask
    assign out_r = y;
  end else begin : g_mask
    assign out_r = (out_tag.col < COLW'(S)) ? '0 : y;
  end
endmodule
