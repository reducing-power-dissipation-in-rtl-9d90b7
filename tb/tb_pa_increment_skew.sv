// tb_pa_increment_skew -- checks the gated increment register and skew rows.
//
// Uses N = 16 with radix 2^4 (four rows). A model keeps the history of the
// increment register: after every rising edge digit d of the output must
// equal digit d of the value the register held d edges earlier. Loads come
// at random, some back to back, so several increments are in the rows at
// once. The test also counts rising edges of each row's gated clock: row s
// may be clocked only in the cycle where load was 1 s cycles before, and
// busy must be 1 exactly when a load is in the delay line or on the input.
module tb_pa_increment_skew;
  localparam int unsigned N = 16;
  localparam int unsigned K = 4;
  localparam int unsigned D = N / K;

  logic clk = 1'b0, rst_n = 1'b1, load = 1'b0;
  logic [N-1:0] inc = '0;
  logic [D-1:0][K-1:0] a_digit;
  logic busy;
  int checks = 0, failures = 0;
  int rowedges[D];
  int gated_off = 0, loads = 0;

  pa_increment_skew #(.N(N), .K(K)) dut (
    .clk(clk), .rst_n(rst_n), .load(load), .inc(inc), .a_digit(a_digit), .busy(busy)
  );

  always #5 clk = ~clk;

  initial for (int s = 0; s < int'(D); s++) rowedges[s] = 0;
  always @(posedge dut.g_row[0].gclk) rowedges[0]++;
  always @(posedge dut.g_row[1].gclk) rowedges[1]++;
  always @(posedge dut.g_row[2].gclk) rowedges[2]++;
  always @(posedge dut.g_row[3].gclk) rowedges[3]++;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] areg [D];       // areg[j]: register value j edges ago
    logic         lhist [D];      // lhist[j]: load sampled j edges ago
    int           prev_edges [D];
    logic         lnow;
    logic [N-1:0] inow;
    for (int j = 0; j < int'(D); j++) begin areg[j] = '0; lhist[j] = 1'b0; end
    #1 rst_n = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    @(posedge clk); #1;
    for (int c = 0; c < 3000; c++) begin
      // inputs change 1 time unit after the rising edge
      load <= 1'(($urandom % (c < 1500 ? 20 : 2)) == 0);
      inc  <= N'($urandom);
      @(negedge clk);
      lnow = load; inow = inc;
      for (int s = 0; s < int'(D); s++) prev_edges[s] = rowedges[s];
      checks++;
      if (busy !== (lnow | lhist[0] | lhist[1] | lhist[2])) begin
        failures++; $display("busy wrong");
      end
      @(posedge clk); #1;
      // shift the model: the edge just passed sampled lnow/inow
      for (int j = int'(D) - 1; j > 0; j--) begin areg[j] = areg[j-1]; lhist[j] = lhist[j-1]; end
      if (lnow) areg[0] = inow;
      lhist[0] = lnow;
      if (lnow) loads++;
      for (int d = 0; d < int'(D); d++) begin
        checks++;
        if (a_digit[d] !== areg[d][d*K +: K]) begin
          failures++;
          if (failures < 10) $display("digit %0d = %h expected %h", d, a_digit[d], areg[d][d*K +: K]);
        end
        checks++;
        if (rowedges[d] - prev_edges[d] != int'(lhist[d])) begin
          failures++; $display("row %0d clocked %0d times, expected %0d", d, rowedges[d] - prev_edges[d], lhist[d]);
        end
        if (!lhist[d]) gated_off++;
      end
    end
    checks++;
    if (loads == 0 || gated_off == 0) failures++;
    $display("loads=%0d gated row-cycles=%0d", loads, gated_off);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
