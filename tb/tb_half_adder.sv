// tb_half_adder: exhaustive check of the half adder against a + b.
module tb_half_adder;
  logic a, b, sum, carry_out;
  int checks = 0, failures = 0;

  half_adder dut (.a(a), .b(b), .sum(sum), .carry_out(carry_out));

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      #1;
      checks++;
      if ({carry_out, sum} != 2'(a + b)) begin
        failures++;
        $display("FAIL a=%0b b=%0b -> c=%0b s=%0b", a, b, carry_out, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
