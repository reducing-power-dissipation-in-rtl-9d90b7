// pa_gated_dff -- flip-flop with its own clock gate (individual gating).
//
// The enabling function is the XOR of the data input and the stored value:
// the flip-flop is clocked only in cycles in which its state would change.
// That enable goes through pa_clock_gate (NAND with the inverted clock), so
// the register never sees a clock edge while d equals q, which saves the
// internal clock power of flip-flops whose data rarely toggle.
//
// Interface and timing: behaves as an ordinary rising-edge D flip-flop on clk
// with asynchronous active-low reset to 0: q takes d at every rising edge of
// clk. d must change only after a rising edge of clk and settle before the
// following falling edge. The XOR/NAND enabling function comes from the
// published individual gating scheme; the asynchronous reset is this
// implementation's own choice, made so
// the register can be initialised while its clock is gated off.
module pa_gated_dff (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q
);
  logic en;
  logic gclk;

  assign en = d ^ q;

  pa_clock_gate u_cg (.clk(clk), .en(en), .gclk(gclk));

  always_ff @(posedge gclk or negedge rst_n) begin
    if (!rst_n) q <= 1'b0;
    else        q <= d;
  end
endmodule
