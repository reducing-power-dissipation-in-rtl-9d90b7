// tb_pa_accumulator -- end-to-end test of the pipelined phase accumulator at
// its default size (N = 32, M = 16, radix 2^8, four pipeline stages).
//
// A reference model keeps the unpipelined sum S(e) = S(e-1) + A(e-1) and a
// history of it; at every falling edge the DUT's phase must equal the top M
// bits of S(e-D+1). Stimulus is driven from the rising edge of the clock, as
// the gated clocks require. The test runs in phases: a latency measurement
// (one large increment loaded into an idle accumulator, which must first show
// in phase exactly D+1 edges after the edge that samples load), long runs
// with a held increment, bursts of back-to-back loads, and small power-of-two
// increments. It counts how often each mechanism occurred and fails if one
// never did: increment loads, loads issued while the previous increment was
// still in the skew rows, cycles with the skew-row clocks gated off, carries
// stored between digit columns, wrap-around of the accumulator, and cycles in
// which an individually gated output flip-flop received no clock edge.
// A checker bound to every clock gate asserts that no enable changes while
// the clock is low, the condition for glitch-free gated clocks.
module tb_pa_accumulator;
  localparam int unsigned N = 32;
  localparam int unsigned M = 16;
  localparam int unsigned K = 8;
  localparam int unsigned D = N / K;
  localparam int unsigned NCYC = 20000;

  logic         clk = 1'b0;
  logic         rst_n = 1'b1;
  logic         load = 1'b0;
  logic [N-1:0] inc = '0;
  logic [M-1:0] phase;
  logic         busy;

  int checks = 0;
  int failures = 0;

  pa_accumulator dut (
    .clk(clk), .rst_n(rst_n), .load(load), .inc(inc), .phase(phase), .busy(busy)
  );

  always #5 clk = ~clk;

  // every clock gate in the design must see its enable settle in the high phase
  bind pa_clock_gate tb_gate_rule_check u_gate_rule (.clk(clk), .en(en));

  // watchdog
  initial begin
    repeat (NCYC + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference model, checked at falling edges -------------
  logic [N-1:0] s_model = '0;
  logic [N-1:0] a_model = '0;
  logic         pend_load = 1'b0;
  logic [N-1:0] pend_inc = '0;
  logic [N-1:0] hist[$];
  logic         model_on = 1'b0;
  int           wraps = 0;

  initial for (int i = 0; i < int'(D) - 1; i++) hist.push_back('0);

  always @(negedge clk) begin
    if (model_on) begin
      logic [N:0]   wide;
      logic [N-1:0] expect_s;
      wide    = {1'b0, s_model} + {1'b0, a_model};
      if (wide[N]) wraps++;
      s_model = wide[N-1:0];
      if (pend_load) a_model = pend_inc;
      pend_load = load;
      pend_inc  = inc;
      hist.push_back(s_model);
      expect_s = hist.pop_front();
      checks++;
      if (phase !== expect_s[N-1 -: M]) begin
        failures++;
        if (failures < 10)
          $display("t=%0t phase=%h expected=%h", $time, phase, expect_s[N-1 -: M]);
      end
    end
  end

  // ---------------- mechanism counters ------------------------------------
  int loads = 0, loads_busy = 0, gated_rows = 0, carries = 0;
  int clk_edges = 0, ff_edges = 0;
  always @(posedge clk) if (model_on) begin
    clk_edges++;
    if (load) loads++;
    if (load && |dut.u_skew.f[D-1:1]) loads_busy++;
    if (!busy && !load) gated_rows++;
    if (|dut.carry) carries++;
  end
  // lowest kept bit sits in digit 2 and has one individually gated flip-flop
  always @(posedge dut.u_deskew.g_bit[0].g_dly.g_ff[0].u_ff.gclk)
    if (model_on) ff_edges++;

  task automatic drive(input logic l, input logic [N-1:0] v);
    @(posedge clk);
    load <= l;
    if (l) inc <= v;
  endtask

  initial begin
    int lat;
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    @(posedge clk);
    model_on = 1'b1;

    // --- latency: load a large increment into the idle accumulator
    drive(1'b1, 32'h8000_0001);   // sampled at the next rising edge
    drive(1'b0, '0);              // this is the edge that samples load
    lat = 1;
    while (phase == '0 && lat < 50) begin
      @(posedge clk); #1; lat++;
    end
    checks++;
    if (lat != int'(D) + 1) begin
      failures++;
      $display("latency %0d edges, expected %0d", lat, D + 1);
    end

    // --- random operation
    for (int c = 0; c < int'(NCYC); c++) begin
      int mode;
      mode = (c / 2000) % 4;
      case (mode)
        0: drive(($urandom % 500) == 0, N'({$urandom, $urandom}));        // rare changes
        1: drive(($urandom % 3) == 0, N'({$urandom, $urandom}));          // bursts
        2: drive(($urandom % 400) == 0, N'(1) << ($urandom % 20));               // small 2^k
        default: drive(($urandom % 50) == 0, N'(1) << (8 + $urandom % 24));      // mid 2^k
      endcase
    end
    drive(1'b0, '0);
    repeat (2 * D) @(posedge clk);
    @(negedge clk);
    model_on = 1'b0;

    $display("loads=%0d loads_while_busy=%0d gated_row_cycles=%0d carry_cycles=%0d wraps=%0d",
             loads, loads_busy, gated_rows, carries, wraps);
    $display("individually gated ff: %0d clock edges in %0d cycles", ff_edges, clk_edges);
    checks++; if (loads == 0)      begin failures++; $display("no increment load"); end
    checks++; if (loads_busy == 0) begin failures++; $display("no load while busy"); end
    checks++; if (gated_rows == 0) begin failures++; $display("skew rows never gated"); end
    checks++; if (carries == 0)    begin failures++; $display("no stored carry"); end
    checks++; if (wraps == 0)      begin failures++; $display("accumulator never wrapped"); end
    checks++; if (ff_edges == 0 || ff_edges >= clk_edges) begin
      failures++; $display("individual gating not exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
