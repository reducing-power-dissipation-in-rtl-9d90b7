// pa_digit_adder -- radix-2^K adder cell of the pipelined accumulator.
//
// Adds two K-bit digits and a carry-in in one clock cycle and returns the
// K-bit digit sum and the carry-out. With K = 1 it is a full adder; larger K
// let the carry propagate across K bits before it is stored, which trades a
// longer clock period for fewer pipeline stages. The carries are formed in a
// carry-lookahead manner: every carry c[i+1] is computed directly from the
// generate (a&b) and propagate (a^b) terms of bits 0..i and from cin, as a
// two-level sum of products, so no carry waits for the one below it.
//
// Interface and timing: purely combinational. A lookahead-like radix-2^K
// cell is what the accumulator scheme asks for; the flat two-level expansion
// (rather than a tree) is this implementation's own choice, adequate for the digit widths used (up to 8 bits).
module pa_digit_adder #(
  parameter int unsigned K = 8   // bits per digit, radix 2^K
) (
  input  logic [K-1:0] a,
  input  logic [K-1:0] b,
  input  logic         cin,
  output logic [K-1:0] s,
  output logic         cout
);
  logic [K-1:0] g;
  logic [K-1:0] p;
  logic [K:0]   c;

  assign g = a & b;
  assign p = a ^ b;

  always_comb begin
    logic term;
    logic carry;
    c[0] = cin;
    for (int i = 0; i < int'(K); i++) begin
      carry = 1'b0;
      // generate at bit j propagated through bits j+1..i
      for (int j = 0; j <= i; j++) begin
        term = g[j];
        for (int l = j + 1; l <= i; l++) term = term & p[l];
        carry = carry | term;
      end
      // carry-in propagated through bits 0..i
      term = cin;
      for (int l = 0; l <= i; l++) term = term & p[l];
      c[i+1] = carry | term;
    end
  end

  assign s    = p ^ c[K-1:0];
  assign cout = c[K];
endmodule
