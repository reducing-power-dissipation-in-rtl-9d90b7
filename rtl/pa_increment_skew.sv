// pa_increment_skew -- increment register and its skew triangle, clock gated.
//
// The accumulator adds digit d of the increment A in pipeline stage d, so
// digit d must reach its adder d cycles after digit 0. Row 0 is the register
// that holds A; row s (s = 1 .. D-1) holds digits s .. D-1 of the row above,
// one cycle later. Digit d is taken from row d. That is
// K*D*(D-1)/2 skew flip-flops besides the N of row 0, with D = N/K.
//
// These rows change only when a new increment is loaded, so each row has its
// clock gated. A 1-bit delay line f[1..D-1] carries the load strobe down the
// triangle: row 0 is clocked only in the cycle of load, row s only in the
// cycle where f[s] = load delayed by s cycles is 1, each through a
// pa_clock_gate. The delay line itself runs on the free clock.
//
// Interface and timing: load and inc are sampled at a rising edge of clk
// (drive them from the rising edge; they must settle before the falling
// edge). After that edge a_digit[0] holds the new digit 0, and a_digit[d]
// switches to the new digit d exactly d edges later. busy is 1 while a newly
// loaded increment is still moving down the triangle. A new load may be
// issued at any cycle; every row still sees each increment in order.
// The gated rows and the strobe delay line come from the published scheme;
// gating row 0 with load (the register needs an enable anyway), the busy
// output and the asynchronous reset to zero are this implementation's own
// choices.
module pa_increment_skew #(
  parameter int unsigned N = 32,  // accumulator width n
  parameter int unsigned K = 8    // digit width, radix 2^K
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 load,                 // F: new increment on inc
  input  logic [N-1:0]         inc,                  // increment A (frequency word)
  output logic [N/K-1:0][K-1:0] a_digit,             // digit d delayed d cycles
  output logic                 busy
);
  localparam int unsigned D = N / K;

  if (N % K != 0) begin : g_bad_k
    $error("pa_increment_skew: N must be a multiple of K");
  end

  // strobe delay line: f[s] = load delayed by s cycles
  logic [D-1:0] f;
  if (D > 1) begin : g_dly
    logic [D-1:1] f_q;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) f_q <= '0;
      else        f_q <= f[D-2:0];
    end
    assign f = {f_q, load};
  end else begin : g_dly
    assign f = load;
  end

  assign busy = |f;

  for (genvar s = 0; s < D; s++) begin : g_row
    // row s holds digits s .. D-1; digit d sits at q[(d-s)*K +: K]
    logic                 gclk;
    logic [(D-s)*K-1:0]   q;
    logic [(D-s)*K-1:0]   d_in;

    pa_clock_gate u_cg (.clk(clk), .en(f[s]), .gclk(gclk));

    if (s == 0) begin : g_src
      assign d_in = inc;
    end else begin : g_src
      assign d_in = g_row[s-1].q[(D-s+1)*K-1:K];
    end

    always_ff @(posedge gclk or negedge rst_n) begin
      if (!rst_n) q <= '0;
      else        q <= d_in;
    end

    assign a_digit[s] = q[K-1:0];
  end
endmodule
