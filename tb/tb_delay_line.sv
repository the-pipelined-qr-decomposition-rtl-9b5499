// tb_delay_line: drives random words into a 5-cycle and a 0-cycle delay line
// and checks every output against the input of 5 (or 0) clocks earlier.
module tb_delay_line;
  localparam int W = 10;
  localparam int D = 5;
  logic clk = 1'b0, rst_n;
  logic [W-1:0] din, dout, dout0;
  logic [W-1:0] hist [$];
  int checks = 0, failures = 0;

  delay_line #(.W(W), .D(D)) dut  (.clk, .rst_n, .din, .dout);
  delay_line #(.W(W), .D(0)) dut0 (.clk, .rst_n, .din, .dout(dout0));

  always #5 clk = ~clk;

  initial begin
    rst_n = 1'b0; din = '0;
    @(negedge clk); @(negedge clk);
    // reset clears the line
    checks++;
    if (dout != '0) failures++;
    rst_n = 1'b1;
    for (int t = 0; t < 200; t++) begin
      din = W'($urandom);
      #1;
      checks++;
      if (dout0 != din) failures++;
      hist.push_back(din);
      @(posedge clk); #1;
      if (hist.size() > D) void'(hist.pop_front());
      if (t >= D - 1) begin
        checks++;
        if (dout != hist[0]) begin
          failures++;
          $display("t=%0d dout=%h expected %h", t, dout, hist[0]);
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
