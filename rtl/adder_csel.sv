// adder_csel: carry-select adder. The lowest BLK-bit group is a ripple-carry
// adder fed by cin. Every higher group holds two ripple-carry adders that
// compute the group sum in advance for a carry-in of 0 and of 1; the real
// carry out of the group below then selects one of them, so only the
// selection ripples from group to group.
// Combinational: sum = a + b + cin (mod 2^W), cout = carry out of bit W-1.
// The group size is this design's choice.
module adder_csel #(
  parameter int W   = 14,
  parameter int BLK = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  localparam int NG = (W + BLK - 1) / BLK;
  logic [NG:0] gc;   // carry into every group
  assign gc[0] = cin;

  for (genvar k = 0; k < NG; k++) begin : g_grp
    localparam int LO = k * BLK;
    localparam int HI = ((k + 1) * BLK < W) ? (k + 1) * BLK - 1 : W - 1;
    localparam int GW = HI - LO + 1;
    if (k == 0) begin : g_first
      adder_rca #(.W(GW)) u_add (.a(a[HI:LO]), .b(b[HI:LO]), .cin(gc[0]),
                                 .sum(sum[HI:LO]), .cout(gc[1]));
    end else begin : g_sel
      logic [GW-1:0] s0, s1;
      logic          c0, c1;
      adder_rca #(.W(GW)) u_add0 (.a(a[HI:LO]), .b(b[HI:LO]), .cin(1'b0), .sum(s0), .cout(c0));
      adder_rca #(.W(GW)) u_add1 (.a(a[HI:LO]), .b(b[HI:LO]), .cin(1'b1), .sum(s1), .cout(c1));
      assign sum[HI:LO] = gc[k] ? s1 : s0;
      assign gc[k+1]    = gc[k] ? c1 : c0;
    end
  end
  assign cout = gc[NG];
endmodule
