// tb_pa_output_deskew -- checks alignment and truncation of the output.
//
// Uses N = 16, radix 2^2 (eight columns) and M = 10, so the kept bits span
// digits with delays of 0 to 4 cycles and a digit split by the truncation.
// A random skewed sum is fed in: column d receives, at each edge, digit d of
// the word w(e-d) of a random sequence w. The output must then be the top M
// bits of w(e-D+1), the same word for all bits.
module tb_pa_output_deskew;
  localparam int unsigned N = 16;
  localparam int unsigned K = 2;
  localparam int unsigned M = 10;
  localparam int unsigned D = N / K;

  logic clk = 1'b0, rst_n = 1'b1;
  logic [N-1:0] sum_digit = '0;
  logic [M-1:0] phase;
  int checks = 0, failures = 0;

  pa_output_deskew #(.N(N), .K(K), .M(M)) dut (
    .clk(clk), .rst_n(rst_n), .sum_digit(sum_digit), .phase(phase)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] w [2*D];   // w[j]: word generated j edges ago
    logic [N-1:0] skewed;
    for (int j = 0; j < 2 * int'(D); j++) w[j] = '0;
    #1 rst_n = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int c = 0; c < 3000; c++) begin
      @(posedge clk);
      for (int j = 2 * int'(D) - 1; j > 0; j--) w[j] = w[j-1];
      // slowly changing upper bits, random lower bits
      w[0] = (c % 7 == 0) ? N'($urandom) : {w[1][N-1:N/2], 8'($urandom)};
      for (int d = 0; d < int'(D); d++) skewed[d*K +: K] = w[d][d*K +: K];
      sum_digit <= skewed;
      @(negedge clk);
      if (c > 2 * int'(D)) begin
        // sum_digit now shows w[0..]; output should be word w[D-1]
        checks++;
        if (phase !== w[D-1][N-1 -: M]) begin
          failures++;
          if (failures < 10) $display("phase=%h expected=%h", phase, w[D-1][N-1 -: M]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
