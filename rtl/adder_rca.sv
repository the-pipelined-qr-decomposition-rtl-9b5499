// adder_rca: ripple-carry adder. A chain of W full adders; the carry of bit i
// feeds bit i+1, so the worst-case delay grows linearly with W.
// Combinational: sum = a + b + cin (mod 2^W), cout = carry out of bit W-1.
module adder_rca #(
  parameter int W = 14
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  logic [W:0] c;
  assign c[0] = cin;
  for (genvar i = 0; i < W; i++) begin : g_bit
    full_adder u_fa (.a(a[i]), .b(b[i]), .cin(c[i]), .s(sum[i]), .cout(c[i+1]));
  end
  assign cout = c[W];
endmodule
