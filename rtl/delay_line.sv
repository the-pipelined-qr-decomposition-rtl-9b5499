// delay_line: fixed delay of D clock cycles for a W-bit word (the "Delay"
// blocks that skew and re-align the row streams). A shift register of D
// stages, each with an asynchronous active-low reset to zero so that the
// valid bits inside a delayed tag start cleared. D = 0 is a plain wire.
module delay_line #(
  parameter int W = 14,
  parameter int D = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout
);
  if (D == 0) begin : g_wire
    assign dout = din;
  end else begin : g_sr
    logic [W-1:0] sr [D];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int k = 0; k < D; k++) sr[k] <= '0;
      end else begin
        sr[0] <= din;
        for (int k = 1; k < D; k++) sr[k] <= sr[k-1];
      end
    end
    assign dout = sr[D-1];
  end
endmodule
