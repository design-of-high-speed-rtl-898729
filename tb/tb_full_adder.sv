// tb_full_adder: exhaustive check of the full adder against x + y + carry_in.
module tb_full_adder;
  logic x, y, cin, sum, cout;
  int checks = 0, failures = 0;

  full_adder dut (.x(x), .y(y), .carry_in(cin), .sum(sum), .carry_out(cout));

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      {x, y, cin} = 3'(i);
      #1;
      checks++;
      if (2'({cout, sum}) != 2'(x + y + cin)) begin
        failures++;
        $display("FAIL x=%0b y=%0b cin=%0b -> c=%0b s=%0b", x, y, cin, cout, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
