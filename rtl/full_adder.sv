// full_adder: the one-bit base cell of the ripple-carry, carry-select and
// carry-skip adders. Sum and carry-out of two operand bits and a carry-in,
// purely combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic cout
);
  always_comb begin
    s    = a ^ b ^ cin;
    cout = (a & b) | (cin & (a ^ b));
  end
endmodule
