// tb_d_flip_flop: checks that the flip-flop takes d on the rising edge only,
// holds otherwise, and clears at once when reset rises.
module tb_d_flip_flop;
  logic clock = 0, reset, d, q;
  int checks = 0, failures = 0;

  d_flip_flop dut (.clock(clock), .reset(reset), .d(d), .q(q));

  always #5 clock = ~clock;

  task automatic expect_q(input logic e, input string what);
    checks++;
    if (q !== e) begin
      failures++;
      $display("FAIL %s: q=%0b exp=%0b at %0t", what, q, e, $time);
    end
  endtask

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic model;
    reset = 1; d = 1;
    #12 expect_q(0, "in reset");
    @(negedge clock) reset = 0;
    model = 0;
    d = 0;
    for (int i = 0; i < 40; i++) begin
      @(negedge clock);
      expect_q(model, "held between edges");
      d = 1'($urandom);
      #2 expect_q(model, "no change before edge");
      @(posedge clock) model = d;
      #1 expect_q(model, "captured on edge");
    end
    // asynchronous clear between edges
    @(negedge clock) d = 1;
    @(posedge clock);
    #1 expect_q(1, "set before clear");
    #1 reset = 1;
    #1 expect_q(0, "async clear");
    reset = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
