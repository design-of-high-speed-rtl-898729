// tb_mux_2x1: checks the 1-bit default and a 5-bit instance of the 2x1 mux
// for every select value with random data.
module tb_mux_2x1;
  logic       a1, b1, s, o1;
  logic [4:0] a5, b5, o5;
  int checks = 0, failures = 0;

  mux_2x1            dut1 (.ip1(a1), .ip2(b1), .se(s), .op(o1));
  mux_2x1 #(.WIDTH(5)) dut5 (.ip1(a5), .ip2(b5), .se(s), .op(o5));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      {a1, b1, s} = 3'(i);
      a5 = 5'($urandom);
      b5 = ~a5;
      #1;
      checks++;
      if (o1 != (s ? b1 : a1)) begin
        failures++;
        $display("FAIL 1-bit ip1=%0b ip2=%0b se=%0b op=%0b", a1, b1, s, o1);
      end
      checks++;
      if (o5 != (s ? b5 : a5)) begin
        failures++;
        $display("FAIL 5-bit ip1=%h ip2=%h se=%0b op=%h", a5, b5, s, o5);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
