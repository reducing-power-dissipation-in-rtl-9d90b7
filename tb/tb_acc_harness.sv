// tb_acc_harness -- self-checking run of one pa_accumulator configuration.
//
// Generates its own clock and reset, drives the accumulator from the rising
// edge and checks at every falling edge that phase equals the top M bits of
// S(e-D+1), with S(e) = S(e-1) + A(e-1) kept by a reference model. It first
// measures the latency of an increment loaded into the idle accumulator
// (must be D+1 edges from the edge that samples load), then runs NCYC
// cycles. The increment changes every CHANGE_EVERY cycles; with POW2 set the
// increments are powers of two 2^k, k taken in turn from KLIST, otherwise
// random N-bit words. Results are reported on the output ports when done.
module tb_acc_harness #(
  parameter int unsigned N = 16,
  parameter int unsigned M = 8,
  parameter int unsigned K = 1,
  parameter int unsigned NCYC = 3000,
  parameter int unsigned CHANGE_EVERY = 100,
  parameter bit          POW2 = 1'b0,
  parameter int unsigned NK = 8,
  parameter int unsigned KLIST [NK] = '{0, 8, 9, 10, 11, 12, 13, 14}
) (
  output logic done,
  output int   checks,
  output int   failures,
  output int   loads,
  output int   wraps
);
  localparam int unsigned D = N / K;

  logic         clk = 1'b0;
  logic         rst_n = 1'b1;
  logic         load = 1'b0;
  logic [N-1:0] inc = '0;
  logic [M-1:0] phase;
  logic         busy;

  pa_accumulator #(.N(N), .M(M), .K(K)) dut (
    .clk(clk), .rst_n(rst_n), .load(load), .inc(inc), .phase(phase), .busy(busy)
  );

  always #5 clk = ~clk;

  logic [N-1:0] s_model = '0;
  logic [N-1:0] a_model = '0;
  logic         pend_load = 1'b0;
  logic [N-1:0] pend_inc = '0;
  logic [N-1:0] hist[$];
  logic         model_on = 1'b0;

  initial begin
    done = 1'b0; checks = 0; failures = 0; loads = 0; wraps = 0;
    for (int i = 0; i < int'(D) - 1; i++) hist.push_back('0);
  end

  always @(negedge clk) begin
    if (model_on) begin
      logic [N:0]   wide;
      logic [N-1:0] expect_s;
      wide = {1'b0, s_model} + {1'b0, a_model};
      if (wide[N]) wraps++;
      s_model = wide[N-1:0];
      if (pend_load) a_model = pend_inc;
      if (pend_load) loads++;
      pend_load = load;
      pend_inc  = inc;
      hist.push_back(s_model);
      expect_s = hist.pop_front();
      checks++;
      if (phase !== expect_s[N-1 -: M]) begin
        failures++;
        if (failures < 5)
          $display("N=%0d M=%0d K=%0d t=%0t phase=%h expected=%h", N, M, K, $time,
                   phase, expect_s[N-1 -: M]);
      end
    end
  end

  task automatic drive(input logic l, input logic [N-1:0] v);
    @(posedge clk);
    load <= l;
    if (l) inc <= v;
  endtask

  initial begin
    int lat;
    int kk;
    kk = 0;
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    @(posedge clk);
    model_on = 1'b1;
    drive(1'b1, (N'(1) << (N - 1)) | N'(1));
    drive(1'b0, '0);
    lat = 1;
    while (phase == '0 && lat < 200) begin
      @(posedge clk); #1; lat++;
    end
    checks++;
    if (lat != int'(D) + 1) begin
      failures++;
      $display("N=%0d K=%0d: latency %0d edges, expected %0d", N, K, lat, D + 1);
    end
    for (int c = 0; c < int'(NCYC); c++) begin
      if (c % int'(CHANGE_EVERY) == 0) begin
        if (POW2) begin
          drive(1'b1, N'(1) << KLIST[kk]);
          kk = (kk + 1) % int'(NK);
        end else begin
          drive(1'b1, N'({$urandom, $urandom}));
        end
      end else begin
        drive(1'b0, '0);
      end
    end
    drive(1'b0, '0);
    repeat (2 * D + 2) @(posedge clk);
    @(negedge clk);
    model_on = 1'b0;
    checks++;
    if (loads == 0) failures++;
    done = 1'b1;
  end
endmodule
