// pa_clock_gate -- clock gate for rising-edge flip-flops.
//
// Produces the gated clock  gclk = ~(en & ~clk),  i.e. gclk = ~en | clk.
// While en is 0 the gated clock sits at 1 and the flip-flops behind it see no
// rising edge; while en is 1 it follows clk. A plain AND of en and clk would
// let a change of en during the high phase of clk produce a spurious rising
// edge; with the NAND of en and the inverted clock the gated clock is held
// high during that phase, so an enable that is launched from a rising edge of
// clk and settles within the high phase is glitch free.
//
// Interface and timing: en must come from logic clocked on the rising edge of
// clk and be stable by the falling edge. The rising edge of gclk coincides with
// the rising edge of clk in the cycles where en was 1 during the preceding low
// phase. The NAND form and this timing rule come from the published gated
// flip-flop scheme; the module is plain gates, so a cell library would map
// it onto a NAND2 and the clock tree's inverted clock.
module pa_clock_gate (
  input  logic clk,   // free-running clock
  input  logic en,    // enabling function F
  output logic gclk   // gated clock for rising-edge flip-flops
);
  logic clk_n;

  assign clk_n = ~clk;
  assign gclk  = ~(en & clk_n);
endmodule
