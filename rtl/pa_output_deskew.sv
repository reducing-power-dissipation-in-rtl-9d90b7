// pa_output_deskew -- output alignment triangle with phase truncation.
//
// The digit columns of the pipelined accumulator finish the same sum one
// cycle apart: column d is d cycles behind column 0. To present an aligned
// word, bit b of digit d = b/K is delayed by D-1-d further cycles. Only the M
// most significant bits (the phase word that addresses the waveform table)
// are kept, so the delay chains of the N-M low bits are not built at all,
// which removes the flip-flops a full-width output would need for them.
//
// The delay flip-flops change only when their sum bit changes, which for a
// small increment is rare in the upper digits, so each is a pa_gated_dff: a
// flip-flop individually clock gated by the XOR of its data and its state.
//
// Interface and timing: sum_digit is the concatenation of the column sum
// registers (column d in bits [d*K +: K]). phase[j] is bit N-M+j of the
// aligned sum: column d's bits reach phase D-1-d rising edges after they
// appear on sum_digit, so when column d runs d cycles behind column 0 all
// bits of phase belong to the same accumulation step. The truncation and the
// individual gating come from the published scheme; the asynchronous reset of
// the gated flip-flops to 0 is this implementation's own choice. The top
// digit needs no delay, so its bits are wired straight through.
module pa_output_deskew #(
  parameter int unsigned N = 32,  // accumulator width n
  parameter int unsigned K = 8,   // digit width
  parameter int unsigned M = 16   // phase bits kept, m
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] sum_digit,   // column sum registers, unaligned
  output logic [M-1:0] phase        // top M bits, aligned
);
  localparam int unsigned D = N / K;

  if (N % K != 0 || M > N || M == 0) begin : g_bad
    $error("pa_output_deskew: need N multiple of K and 0 < M <= N");
  end

  for (genvar j = 0; j < M; j++) begin : g_bit
    localparam int unsigned B = N - M + j;     // accumulator bit
    localparam int unsigned L = D - 1 - B / K; // cycles of delay
    if (L == 0) begin : g_dly
      assign phase[j] = sum_digit[B];
    end else begin : g_dly
      logic [L:0] ch;
      assign ch[0] = sum_digit[B];
      for (genvar t = 0; t < L; t++) begin : g_ff
        pa_gated_dff u_ff (.clk(clk), .rst_n(rst_n), .d(ch[t]), .q(ch[t+1]));
      end
      assign phase[j] = ch[L];
    end
  end
endmodule
