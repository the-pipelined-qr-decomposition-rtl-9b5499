// adder_cskip: carry-skip (carry-bypass) adder. Each BLK-bit group is a
// ripple-carry adder. When every bit of a group propagates (a^b all ones)
// the group's carry-in is passed straight to the next group, skipping the
// ripple chain; otherwise the group's own ripple carry-out is used.
// Combinational: sum = a + b + cin (mod 2^W), cout = carry out of bit W-1.
// The group size is this design's choice.
module adder_cskip #(
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
    logic rc;        // ripple carry out of this group
    logic skip;      // all bits of the group propagate
    adder_rca #(.W(GW)) u_add (.a(a[HI:LO]), .b(b[HI:LO]), .cin(gc[k]),
                               .sum(sum[HI:LO]), .cout(rc));
    assign skip    = &(a[HI:LO] ^ b[HI:LO]);
    assign gc[k+1] = skip ? gc[k] : rc;
  end
  assign cout = gc[NG];
endmodule
