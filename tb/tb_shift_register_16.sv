// tb_shift_register_16: checks the 16-bit parallel-in, parallel-out register:
// cleared by reset, output equals the input of the previous rising edge.
module tb_shift_register_16;
  logic        clock = 0, reset;
  logic [15:0] din, dout, model;
  int checks = 0, failures = 0;

  shift_register_16 dut (.clock(clock), .reset(reset), .data_in(din), .data_out(dout));

  always #5 clock = ~clock;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1; din = 16'hA5A5;
    #12;
    checks++;
    if (dout != 16'h0000) begin failures++; $display("FAIL reset value %h", dout); end
    @(negedge clock) reset = 0;
    for (int i = 0; i < 200; i++) begin
      din = 16'($urandom);
      @(posedge clock) model = din;
      @(negedge clock);
      checks++;
      if (dout != model) begin
        failures++;
        $display("FAIL cycle %0d: out=%h exp=%h", i, dout, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
