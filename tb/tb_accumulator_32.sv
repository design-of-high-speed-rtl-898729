// tb_accumulator_32: drives random load / add / shift commands (at most one
// per cycle, some idle cycles) with random multiplier, sum and carry inputs,
// and compares product, b_msb and lsb with a 33-bit reference register after
// every edge. Also replays the 4-bit worked example scaled to 16 bits:
// multiplicand 10, multiplier 2 -> 20.
module tb_accumulator_32;
  logic        clock = 0, reset;
  logic [15:0] multiplier, sum_in, b_msb;
  logic        carry_in, load_c, add_c, shift_c, lsb;
  logic [31:0] product;
  logic [32:0] model;
  int checks = 0, failures = 0;
  int n_load = 0, n_add = 0, n_shift = 0;

  accumulator_32 dut (
    .clock(clock), .reset(reset), .multiplier(multiplier), .sum_in(sum_in),
    .carry_in(carry_in), .load_command(load_c), .add_command(add_c),
    .shift_command(shift_c), .product(product), .b_msb(b_msb), .lsb(lsb)
  );

  always #5 clock = ~clock;

  task automatic compare(input string what);
    checks++;
    if (product != model[31:0] || b_msb != model[31:16] || lsb != model[0]) begin
      failures++;
      $display("FAIL %s: product=%h b_msb=%h lsb=%0b exp=%h", what, product, b_msb, lsb, model);
    end
  endtask

  // one clock with the given command; the reference is updated alongside
  task automatic step(input logic l, input logic a, input logic s);
    load_c = l; add_c = a; shift_c = s;
    @(posedge clock);
    if (l)      model = {17'h0, multiplier};
    else if (a) model = {carry_in, sum_in, model[15:0]};
    else if (s) model = {1'b0, model[32:1]};
    n_load += int'(l); n_add += int'(a); n_shift += int'(s);
    @(negedge clock);
    compare("step");
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1; load_c = 0; add_c = 0; shift_c = 0;
    multiplier = 16'hFFFF; sum_in = 16'hFFFF; carry_in = 1;
    model = '0;
    #12 compare("reset");
    @(negedge clock) reset = 0;

    // 10 x 2, adding the multiplicand to the high half when lsb = 1
    multiplier = 16'd2;
    step(1, 0, 0);
    for (int i = 0; i < 16; i++) begin
      if (lsb) begin
        {carry_in, sum_in} = 17'(b_msb) + 17'd10;
        step(0, 1, 0);
      end
      step(0, 0, 1);
    end
    checks++;
    if (product != 32'd20) begin failures++; $display("FAIL 10x2 = %0d", product); end

    // random command stream
    for (int i = 0; i < 3000; i++) begin
      int r;
      multiplier = 16'($urandom);
      sum_in     = 16'($urandom);
      carry_in   = 1'($urandom);
      r = int'($urandom_range(0, 9));
      case (r)
        0:       step(1, 0, 0);
        1, 2, 3: step(0, 1, 0);
        4, 5, 6, 7, 8: step(0, 0, 1);
        default: step(0, 0, 0);
      endcase
    end
    if (n_load == 0 || n_add == 0 || n_shift == 0) failures++;
    $display("loads=%0d adds=%0d shifts=%0d", n_load, n_add, n_shift);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
