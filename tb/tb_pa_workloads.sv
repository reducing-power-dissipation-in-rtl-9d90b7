// tb_pa_workloads -- runs the accumulator configurations that were evaluated
// for this architecture, each as its own instance of tb_acc_harness:
//  * 16-, 24- and 32-bit accumulators with a 16-bit phase word, each built
//    with radix-2, -4, -16 and -256 adders (K = 1, 2, 4, 8), random
//    increments changing every 100 cycles;
//  * systolic (K = 1) accumulators of 8 to 30 bits with m = n/2 and the
//    increment changing every 1000 cycles;
//  * the 16-bit systolic accumulator with m = 8 driven by increments 2^k,
//    k in {0, 8, 9, ..., 14};
//  * the 8-bit examples: systolic with m = 8 and m = 4, radix-4 with m = 8;
//  * DDFS-sized accumulators: 50 bits with an 18-bit phase word (radix 2^5)
//    and 52 bits with a 14-bit phase word (radix 2^4).
// Each instance checks every output cycle and the latency; the sums are
// printed together. A checker bound to every clock gate asserts that no
// enable changes while the clock is low.
module tb_pa_workloads;
  localparam int NI = 26;
  // one column per instance: rows 0-11 Table II sweep, 12-17 systolic with
  // m = n/2, 18 the 2^k increments, 19-21 the 8-bit examples, 22-25 DDFS-sized
  localparam int unsigned CFG_N  [NI] = '{16, 16, 16, 16, 24, 24, 24, 24, 32, 32, 32, 32, 8, 10, 16, 20, 24, 30, 16, 8, 8, 8, 50, 52, 50, 52};
  localparam int unsigned CFG_M  [NI] = '{16, 16, 16, 16, 16, 16, 16, 16, 16, 16, 16, 16, 4, 5, 8, 10, 12, 15, 8, 8, 4, 8, 18, 14, 18, 14};
  localparam int unsigned CFG_K  [NI] = '{1, 2, 4, 8, 1, 2, 4, 8, 1, 2, 4, 8, 1, 1, 1, 1, 1, 1, 1, 1, 1, 2, 5, 4, 1, 13};
  localparam int unsigned CFG_CE [NI] = '{100, 100, 100, 100, 100, 100, 100, 100, 100, 100, 100, 100, 1000, 1000, 1000, 1000, 1000, 1000, 300, 50, 50, 50, 100, 100, 100, 100};
  localparam bit          CFG_P2 [NI] = '{0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 1, 0, 0, 0, 0, 0, 0, 0};

  logic done [NI];
  int   chk [NI];
  int   fail [NI];
  int   ld [NI];
  int   wr [NI];

  for (genvar i = 0; i < NI; i++) begin : g_run
    tb_acc_harness #(
      .N(CFG_N[i]), .M(CFG_M[i]), .K(CFG_K[i]), .CHANGE_EVERY(CFG_CE[i]), .POW2(CFG_P2[i])
    ) u_h (
      .done(done[i]), .checks(chk[i]), .failures(fail[i]), .loads(ld[i]), .wraps(wr[i])
    );
  end

  // every clock gate in every configuration must see its enable settle in
  // the high phase of the clock
  bind pa_clock_gate tb_gate_rule_check u_gate_rule (.clk(clk), .en(en));

  int checks, failures;

  initial begin
    #10000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", 0, 1);
    $finish;
  end

  initial begin
    logic all_done;
    all_done = 1'b0;
    while (!all_done) begin
      #100;
      all_done = 1'b1;
      for (int i = 0; i < NI; i++) if (!done[i]) all_done = 1'b0;
    end
    checks = 0; failures = 0;
    for (int i = 0; i < NI; i++) begin
      checks += chk[i]; failures += fail[i];
      checks++;
      if (ld[i] == 0 || wr[i] == 0) begin
        failures++;
        $display("instance %0d: loads=%0d wraps=%0d", i, ld[i], wr[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
