// tb_gate_rule_check -- timing rule of the NAND clock gate, for binding.
//
// pa_clock_gate is glitch free only if its enable stays constant through the
// low phase of the clock (it may change only while clk is high). This
// checker records the enable at each falling edge and asserts at the next
// rising edge that it has not changed since. Bind it to pa_clock_gate; an
// assertion failure stops the simulation with an error.
module tb_gate_rule_check (
  input logic clk,
  input logic en
);
  logic en_at_fall = 1'b0;
  logic armed = 1'b0;

  always @(negedge clk) begin
    en_at_fall <= en;
    armed      <= 1'b1;
  end

  always @(posedge clk) begin
    if (armed)
      assert (en == en_at_fall)
        else $error("clock gate enable changed during the low phase of clk");
  end
endmodule
