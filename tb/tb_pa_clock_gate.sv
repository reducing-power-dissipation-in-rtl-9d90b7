// tb_pa_clock_gate -- checks the NAND clock gate gclk = ~(en & ~clk).
//
// Drives en from the rising edge of clk with random values and counts rising
// edges of the gated clock: one must occur exactly at each rising edge of clk
// whose preceding low phase had en = 1, and none otherwise. It also checks the
// level of gclk in both clock phases, including that it stays high through
// the high phase while en changes (the case a plain AND gate would glitch).
module tb_pa_clock_gate;
  logic clk = 1'b0;
  logic en = 1'b0;
  logic gclk;
  int checks = 0, failures = 0;
  int gedges = 0;
  int expect_edges = 0;

  pa_clock_gate dut (.clk(clk), .en(en), .gclk(gclk));

  always #5 clk = ~clk;
  always @(posedge gclk) gedges++;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_prev;
    logic e;
    @(posedge clk);
    for (int c = 0; c < 2000; c++) begin
      #1 en = 1'(($urandom % 3) == 0);   // change in the high phase
      e = en;
      #1 checks++;
      if (gclk !== 1'b1) begin failures++; $display("gclk low in high phase"); end
      @(negedge clk); #1 checks++;
      if (gclk !== ~e) begin failures++; $display("gclk level wrong in low phase"); end
      n_prev = gedges;
      @(posedge clk); #1 checks++;
      if (gedges - n_prev != int'(e)) begin
        failures++; $display("edge count %0d with en=%0b", gedges - n_prev, e);
      end
      expect_edges += int'(e);
    end
    checks++;
    if (expect_edges == 0 || expect_edges == 2000) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
