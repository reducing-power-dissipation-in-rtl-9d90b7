// tb_pa_gated_dff -- checks the individually clock-gated flip-flop.
//
// The flip-flop must behave as a plain D flip-flop: after each rising edge q
// equals the d that was present before it. The test also counts rising edges
// of its internal gated clock and requires one exactly in the cycles where d
// differed from q, and none in the others, and checks the asynchronous reset.
module tb_pa_gated_dff;
  logic clk = 1'b0;
  logic rst_n = 1'b1;
  logic d = 1'b0;
  logic q;
  int checks = 0, failures = 0;
  int gedges = 0, gated = 0;

  pa_gated_dff dut (.clk(clk), .rst_n(rst_n), .d(d), .q(q));

  always #5 clk = ~clk;
  always @(posedge dut.gclk) gedges++;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic dv, qv;
    int n_prev;
    d = 1'b1;
    #1 rst_n = 1'b0;
    #2 checks++;
    if (q !== 1'b0) begin failures++; $display("reset failed"); end
    @(negedge clk) rst_n = 1'b1;
    for (int c = 0; c < 2000; c++) begin
      @(posedge clk);
      d <= 1'(($urandom % 4) == 0) ^ d;   // toggles now and then
      @(negedge clk);
      dv = d; qv = q; n_prev = gedges;
      @(posedge clk); #1;
      checks++;
      if (q !== dv) begin failures++; $display("q=%0b expected %0b", q, dv); end
      checks++;
      if (gedges - n_prev != int'(dv != qv)) begin
        failures++; $display("gated clock edges %0d, d=%0b q=%0b", gedges - n_prev, dv, qv);
      end
      if (dv == qv) gated++;
    end
    checks++;
    if (gated == 0) begin failures++; $display("clock never gated off"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
