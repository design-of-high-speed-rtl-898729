// tb_hs_parallel_multiplier_16: end-to-end test of the 16 x 16 multiplier at
// its only size. Each multiplication holds the operands, pulses start for
// one clock, waits for stop and compares product with multiplicand *
// multiplier computed by the testbench, and checks the latency of
// 34 + (ones in the multiplier) clock edges from the edge that sampled start.
// Operands: the worked example 10 x 2 = 20, corner cases (0, 1, all ones,
// single bits) and random pairs. It counts how often each mechanism of the
// datapath was exercised (load, add, skipped add, shift, adder carry-out
// caught in the accumulator's carry bit, start held high restarting at once),
// using a reference walk of the algorithm over the same operands, and counts
// a failure for any that never occurred.
module tb_hs_parallel_multiplier_16;
  logic        clock = 0, reset, start;
  logic [15:0] multiplicand, multiplier;
  logic [31:0] product;
  logic        stop;
  int checks = 0, failures = 0;
  int n_load = 0, n_add = 0, n_skip = 0, n_shift = 0, n_carry = 0, n_restart = 0;

  hs_parallel_multiplier_16 dut (
    .clock(clock), .reset(reset), .start(start),
    .multiplicand(multiplicand), .multiplier(multiplier),
    .product(product), .stop(stop)
  );

  always #5 clock = ~clock;   // 10 ns clock period

  // Reference walk of the shift-and-add algorithm: counts the mechanisms one
  // multiplication exercises (adds, skipped adds, shifts, adder carry-outs)
  // and returns the product it predicts.
  function automatic logic [31:0] ref_walk(input logic [15:0] a, input logic [15:0] b);
    logic [15:0] hi = '0, lo = b;
    logic        c = 1'b0;
    n_load++;
    for (int i = 0; i < 16; i++) begin
      if (lo[0]) begin
        n_add++;
        {c, hi} = 17'(hi) + 17'(a);
        if (c) n_carry++;
      end else n_skip++;
      {c, hi, lo} = {1'b0, c, hi, lo[15:1]};
      n_shift++;
    end
    return {hi, lo};
  endfunction

  task automatic multiply(input logic [15:0] a, input logic [15:0] b);
    int cycles;
    logic [31:0] exp;
    @(negedge clock);
    multiplicand = a; multiplier = b;
    @(negedge clock);          // multiplicand register picks up a
    start = 1;
    @(posedge clock); cycles = 1;
    @(negedge clock) start = 0;
    while (!stop && cycles < 100) begin
      @(posedge clock); cycles++;
      @(negedge clock);
    end
    exp = 32'(a) * 32'(b);
    checks++;
    if (ref_walk(a, b) != exp) begin
      failures++;
      $display("FAIL reference walk disagrees for %0d x %0d", a, b);
    end
    checks++;
    if (product != exp) begin
      failures++;
      $display("FAIL %0d x %0d = %0d, expected %0d", a, b, product, exp);
    end
    checks++;
    if (cycles != 34 + $countones(b)) begin
      failures++;
      $display("FAIL %0d x %0d took %0d cycles, expected %0d", a, b, cycles, 34 + $countones(b));
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1; start = 0; multiplicand = 0; multiplier = 0;
    #22;
    checks++;
    if (!stop || product != 0) begin failures++; $display("FAIL reset state"); end
    @(negedge clock) reset = 0;

    multiply(16'd10, 16'd2);
    $display("10 x 2 = %0d", product);
    multiply(16'd24, 16'd360);
    multiply(16'd0, 16'hFFFF);
    multiply(16'hFFFF, 16'd0);
    multiply(16'd1, 16'd1);
    multiply(16'hFFFF, 16'hFFFF);
    multiply(16'hFFFF, 16'd1);
    multiply(16'h8000, 16'h8000);
    for (int k = 0; k < 16; k++) multiply(16'($urandom), 16'(1) << k);
    for (int i = 0; i < 300; i++) multiply(16'($urandom), 16'($urandom));

    // product stays valid in IDLE
    repeat (5) @(negedge clock);
    checks++;
    if (!stop || product != 32'(multiplicand) * 32'(multiplier)) begin
      failures++; $display("FAIL product not held in IDLE");
    end

    // start held high: the next multiplication starts as soon as stop rises
    @(negedge clock);
    multiplicand = 16'd1234; multiplier = 16'd567;
    @(negedge clock) start = 1;
    @(posedge stop);
    @(negedge clock);
    checks++;
    if (product != 32'd699678) begin failures++; $display("FAIL held-start product %0d", product); end
    @(negedge clock);
    checks++;
    if (stop) begin failures++; $display("FAIL no restart with start held"); end
    else n_restart++;
    start = 0;
    @(posedge stop);
    @(negedge clock);
    checks++;
    if (product != 32'd699678) begin failures++; $display("FAIL restarted product %0d", product); end

    $display("mechanisms: load=%0d add=%0d skipped_add=%0d shift=%0d carry_into_acc=%0d restart=%0d",
             n_load, n_add, n_skip, n_shift, n_carry, n_restart);
    if (n_load == 0)    begin failures++; $display("FAIL load never happened"); end
    if (n_add == 0)     begin failures++; $display("FAIL add never happened"); end
    if (n_skip == 0)    begin failures++; $display("FAIL skipped add never happened"); end
    if (n_shift == 0)   begin failures++; $display("FAIL shift never happened"); end
    if (n_carry == 0)   begin failures++; $display("FAIL adder carry-out never happened"); end
    if (n_restart == 0) begin failures++; $display("FAIL restart never happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
