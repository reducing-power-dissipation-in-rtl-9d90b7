// tb_pa_digit_adder -- checks the radix-2^K lookahead digit adder.
//
// Three instances (K = 1, 4 and 8) are compared with integer addition: all
// input combinations for K = 1 and K = 4, and every a, b pair with both
// carry-in values for K = 8.
module tb_pa_digit_adder;
  int checks = 0, failures = 0;

  logic       a1, b1, c1, s1, co1;
  logic [3:0] a4, b4, s4;
  logic       c4, co4;
  logic [7:0] a8, b8, s8;
  logic       c8, co8;

  pa_digit_adder #(.K(1)) u1 (.a(a1), .b(b1), .cin(c1), .s(s1), .cout(co1));
  pa_digit_adder #(.K(4)) u4 (.a(a4), .b(b4), .cin(c4), .s(s4), .cout(co4));
  pa_digit_adder          u8 (.a(a8), .b(b8), .cin(c8), .s(s8), .cout(co8));

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a1, b1, c1} = 3'(v);
      #1 checks++;
      if ({co1, s1} !== 2'(a1 + b1 + c1)) failures++;
    end
    for (int v = 0; v < 512; v++) begin
      {a4, b4, c4} = 9'(v);
      #1 checks++;
      if ({co4, s4} !== 5'(a4 + b4 + c4)) failures++;
    end
    for (int v = 0; v < 131072; v++) begin
      {a8, b8, c8} = 17'(v);
      #1 checks++;
      if ({co8, s8} !== 9'(a8 + b8 + c8)) begin
        failures++;
        if (failures < 10) $display("%h+%h+%b -> %b %h", a8, b8, c8, co8, s8);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
