// addsub: the add/subtract unit of one CORDIC iteration.
// y = a + b when sub = 0 and y = a - b when sub = 1 (two's complement, mod
// 2^W): b is inverted and the carry-in set for a subtraction. The adder
// architecture is chosen at elaboration by ARCH; the carry look-ahead adder,
// the fastest of the four in the design study, is the default.
// Combinational.
module addsub
  import qr_pkg::*;
#(
  parameter int          W    = 14,
  parameter adder_arch_e ARCH = ADD_CLA,
  parameter int          BLK  = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         sub,
  output logic [W-1:0] y
);
  logic [W-1:0] bx;
  logic         co;
  assign bx = b ^ {W{sub}};

  if (ARCH == ADD_RCA) begin : g_rca
    adder_rca   #(.W(W))            u_add (.a(a), .b(bx), .cin(sub), .sum(y), .cout(co));
  end else if (ARCH == ADD_CLA) begin : g_cla
    adder_cla   #(.W(W), .BLK(BLK)) u_add (.a(a), .b(bx), .cin(sub), .sum(y), .cout(co));
  end else if (ARCH == ADD_CSEL) begin : g_csel
    adder_csel  #(.W(W), .BLK(BLK)) u_add (.a(a), .b(bx), .cin(sub), .sum(y), .cout(co));
  end else begin : g_cskip
    adder_cskip #(.W(W), .BLK(BLK)) u_add (.a(a), .b(bx), .cin(sub), .sum(y), .cout(co));
  end
endmodule
