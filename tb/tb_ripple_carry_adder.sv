// tb_ripple_carry_adder: exhaustive check of 2-, 3-, 4- and 5-bit ripple-
// carry adders (every operand pair and carry-in) against integer addition.
module tb_ripple_carry_adder;
  int checks = 0, failures = 0;

  logic [4:0] x, y;
  logic       cin;
  logic [1:0] s2; logic c2;
  logic [2:0] s3; logic c3;
  logic [3:0] s4; logic c4;
  logic [4:0] s5; logic c5;

  ripple_carry_adder              dut2 (.x(x[1:0]), .y(y[1:0]), .carry_in(cin), .sum(s2), .carry_out(c2));
  ripple_carry_adder #(.WIDTH(3)) dut3 (.x(x[2:0]), .y(y[2:0]), .carry_in(cin), .sum(s3), .carry_out(c3));
  ripple_carry_adder #(.WIDTH(4)) dut4 (.x(x[3:0]), .y(y[3:0]), .carry_in(cin), .sum(s4), .carry_out(c4));
  ripple_carry_adder #(.WIDTH(5)) dut5 (.x(x),      .y(y),      .carry_in(cin), .sum(s5), .carry_out(c5));

  task automatic check(input int w, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL w=%0d x=%0d y=%0d cin=%0b got=%0d exp=%0d", w, x, y, cin, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++)
      for (int j = 0; j < 32; j++)
        for (int c = 0; c < 2; c++) begin
          x = 5'(i); y = 5'(j); cin = 1'(c);
          #1;
          check(5, int'({c5, s5}), i + j + c);
          if (i < 16 && j < 16) check(4, int'({c4, s4}), i + j + c);
          if (i < 8  && j < 8)  check(3, int'({c3, s3}), i + j + c);
          if (i < 4  && j < 4)  check(2, int'({c2, s2}), i + j + c);
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
