// pa_accumulator -- low-power pipelined phase accumulator for a DDFS.
//
// A direct digital frequency synthesiser adds a frequency word A to an N-bit
// phase register every clock and feeds the top M bits (the phase word) to a
// waveform table. At GHz clock rates the carry chain of a wide adder cannot
// settle in one cycle, so the accumulator is pipelined: the N bits are cut
// into D = N/K digits of K bits, and digit column d has its own K-bit sum
// register, a radix-2^K adder (pa_digit_adder) and, except the top column, a
// carry flip-flop that hands its carry to column d+1 one cycle later. Column
// d thus runs d cycles behind column 0. K = 1 is the fully systolic
// (bit-level) accumulator; larger K shortens the pipeline to D stages.
//
// Around the columns:
//  * pa_increment_skew delays digit d of A by d cycles so every column adds
//    the same increment in the same accumulation step; its rows are clock
//    gated and clocked only while a newly loaded increment moves through.
//  * pa_output_deskew re-aligns the columns, keeps only the top M bits
//    (phase truncation) and uses individually gated flip-flops.
// Flip-flops: N (increment) + K*D*(D-1)/2 (skew) + N (sums) + D-1 (carries)
// + the deskew chains of the M kept bits.
//
// Interface and timing: load and inc are sampled on the rising edge of clk;
// drive them from the rising edge. The increment register captures inc at the
// edge where load is 1 (edge 0); from edge 1 on column 0 adds it. phase at
// edge e is the top M bits of S(e-D+1), where S(e) = S(e-1) + A(e-1) is the
// unpipelined sum and A(e-1) the value of the increment register before edge
// e. A new increment first shows in phase D edges after the increment
// register takes it (D+1 after the edge that samples load). busy is 1 while
// an increment is moving down the skew rows. rst_n clears everything
// asynchronously. The column structure, both gating schemes, the truncation
// and the defaults (a 32-bit accumulator with a 16-bit phase word and
// radix-256 adders, the configuration that scheme reports as its best at
// 1 GHz) come from the published low-power accumulator scheme; the reset,
// the busy flag and the discarded top carry are this implementation's own
// choices.
module pa_accumulator #(
  parameter int unsigned N = 32,  // accumulator width n
  parameter int unsigned M = 16,  // phase word width m (bits kept)
  parameter int unsigned K = 8    // digit width: radix-2^K adders
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,    // new frequency word on inc
  input  logic [N-1:0] inc,     // frequency word (increment A)
  output logic [M-1:0] phase,   // truncated, aligned phase word
  output logic         busy     // new increment still entering the pipeline
);
  localparam int unsigned D = N / K;

  if (N % K != 0 || M > N || M == 0) begin : g_bad
    $error("pa_accumulator: need N multiple of K and 0 < M <= N");
  end

  logic [D-1:0][K-1:0] a_digit;   // skewed increment digits
  logic [D-1:0][K-1:0] sum_q;     // column sum registers
  logic [D-1:0][K-1:0] sum_d;
  logic [D-1:0]        carry;     // carry[d]: carry into column d
  logic [D:1]          carry_d;   // carry_d[d+1]: carry out of column d;
                                  // carry_d[D] leaves the accumulator, which
                                  // wraps modulo 2^N, and is left unused

  pa_increment_skew #(.N(N), .K(K)) u_skew (
    .clk    (clk),
    .rst_n  (rst_n),
    .load   (load),
    .inc    (inc),
    .a_digit(a_digit),
    .busy   (busy)
  );

  assign carry[0]   = 1'b0;

  for (genvar d = 0; d < D; d++) begin : g_col
    pa_digit_adder #(.K(K)) u_add (
      .a   (sum_q[d]),
      .b   (a_digit[d]),
      .cin (carry[d]),
      .s   (sum_d[d]),
      .cout(carry_d[d+1])
    );

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) sum_q[d] <= '0;
      else        sum_q[d] <= sum_d[d];
    end

    if (d < D - 1) begin : g_cff
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) carry[d+1] <= 1'b0;
        else        carry[d+1] <= carry_d[d+1];
      end
    end
  end

  pa_output_deskew #(.N(N), .K(K), .M(M)) u_deskew (
    .clk      (clk),
    .rst_n    (rst_n),
    .sum_digit(sum_q),
    .phase    (phase)
  );
endmodule
