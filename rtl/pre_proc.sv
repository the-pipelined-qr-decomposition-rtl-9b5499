// pre_proc: pre-processing of one pipeline stage ("PreProc"). Every row
// stream entering stage S is multiplied by its own power of K, K^pre_exp(M,S,r),
// by a linear-mode CORDIC (or just delayed when the power is K^0). The powers
// equalise the CORDIC stretching that the rows will meet in the rotation
// chain, so that the two rows of every Givens rotation carry the same gain:
// stage 0 applies S = diag(K^-2(M-1), K^-2(M-1), K^-(2M-3), ..., K^-M),
// later stages multiply only their pivot row by K.
// All rows leave together, pre_latency(M,S,FRAC) cycles after they enter; the
// tag is delayed by the same amount. One column per clock.
// Scaling the rows in front of the rotations follows the design description;
// the exact exponents are derived in the README for this architecture.
module pre_proc
  import qr_pkg::*;
#(
  parameter int          W    = 14,
  parameter int          FRAC = 11,
  parameter int          M    = 4,
  parameter int          S    = 0,
  parameter adder_arch_e ARCH = ADD_CLA,
  localparam int         ROWS = M - S
) (
  input  logic                clk,
  input  logic                rst_n,
  input  tag_t                in_tag,
  input  logic signed [W-1:0] in_row  [ROWS],
  output tag_t                out_tag,
  output logic signed [W-1:0] out_row [ROWS]
);
  localparam int LAT = pre_latency(M, S, FRAC);

  delay_line #(.W($bits(tag_t)), .D(LAT)) u_tag (
    .clk, .rst_n, .din(in_tag), .dout(out_tag));

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    localparam int E = pre_exp(M, S, r);
    if (E == 0) begin : g_pass
      delay_line #(.W(W), .D(LAT)) u_dly (
        .clk, .rst_n, .din(in_row[r]), .dout(out_row[r]));
    end else begin : g_scale
      localparam int IMIN = lin_imin(E);
      localparam int GY   = lin_guard(E);
      localparam int ZW   = FRAC + GY + 2 - IMIN;
      localparam logic signed [ZW-1:0] ZK = ZW'(kfix(E, FRAC + GY));
      tag_t                unused_tag;
      logic signed [W-1:0] y;
      cordic_linear #(.W(W), .FRAC(FRAC), .IMIN(IMIN), .GY(GY), .ARCH(ARCH)) u_mul (
        .clk, .rst_n, .in_tag(in_tag), .in_x(in_row[r]), .in_z(ZK),
        .out_tag(unused_tag), .out_y(y));
      delay_line #(.W(W), .D(LAT - lin_latency(E, FRAC))) u_pad (
        .clk, .rst_n, .din(y), .dout(out_row[r]));
    end
  end
endmodule
