// tb_sqrt_csla_16: checks the 16-bit square-root carry-select adder against
// integer addition: the example 24 + 360 = 384, corner cases that carry
// through every group boundary, and 20000 random operand pairs.
module tb_sqrt_csla_16;
  logic [15:0] x, y, sum;
  logic        cout;
  int checks = 0, failures = 0;

  sqrt_csla_16 dut (.x(x), .y(y), .sum(sum), .carry_out(cout));

  task automatic apply(input logic [15:0] a, input logic [15:0] b);
    logic [16:0] exp;
    x = a; y = b;
    #1;
    exp = 17'(a) + 17'(b);
    checks++;
    if ({cout, sum} != exp) begin
      failures++;
      $display("FAIL %h + %h -> %b_%h exp %h", a, b, cout, sum, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply(16'd24, 16'd360);
    apply(16'h0000, 16'h0000);
    apply(16'hFFFF, 16'h0001);
    apply(16'hFFFF, 16'hFFFF);
    apply(16'h8000, 16'h8000);
    apply(16'h7FFF, 16'h0001);
    // a carry born in each group and rippling up through all groups above it
    for (int k = 0; k < 16; k++) apply(16'hFFFF >> (15 - k), 16'(1));
    for (int k = 0; k < 16; k++) apply(16'hFFFF, 16'(1) << k);
    for (int i = 0; i < 20000; i++) apply(16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
