// adder_cla: two-level carry look-ahead adder.
// Bit generate g = a&b and propagate p = a^b are formed for every position.
// Inside each BLK-bit group every carry is computed directly from g, p and
// the group carry-in as a sum of products (no rippling); each group also
// yields a group generate G and propagate P. A second look-ahead unit of the
// same sum-of-products form computes all group carry-ins from G, P and cin.
// Combinational: sum = a + b + cin (mod 2^W), cout = carry out of bit W-1.
// The group size is this design's choice.
module adder_cla #(
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

  logic [W-1:0]  g, p;
  logic [W:0]    c;        // carry into every bit, c[W] = carry out
  logic [NG-1:0] gg, gp;   // group generate / propagate
  logic [NG:0]   gc;       // carry into every group

  always_comb begin
    g = a & b;
    p = a ^ b;
    // group generate and propagate
    for (int k = 0; k < NG; k++) begin
      gg[k] = 1'b0;
      gp[k] = 1'b1;
      for (int i = k * BLK; i < (k + 1) * BLK && i < W; i++) begin
        gg[k] = g[i] | (p[i] & gg[k]);
        gp[k] = gp[k] & p[i];
      end
    end
    // group carries: gc[k] = OR_j (gg[j] & AND_{j<l<k} gp[l]) | (AND_{l<k} gp[l] & cin)
    for (int k = 0; k <= NG; k++) begin
      logic term;
      gc[k] = 1'b0;
      for (int j = -1; j < k; j++) begin
        term = (j < 0) ? cin : gg[j];
        for (int l = j + 1; l < k; l++) term = term & gp[l];
        gc[k] = gc[k] | term;
      end
    end
    // carries inside each group, again in sum-of-products form
    for (int i = 0; i < W; i++) begin
      int base;
      logic term;
      base = (i / BLK) * BLK;
      c[i] = 1'b0;
      for (int j = base - 1; j < i; j++) begin
        term = (j < base) ? gc[i / BLK] : g[j];
        for (int l = j + 1; l < i; l++) term = term & p[l];
        c[i] = c[i] | term;
      end
    end
    c[W] = gc[NG];
    sum  = p ^ c[W-1:0];
    cout = c[W];
  end
endmodule
