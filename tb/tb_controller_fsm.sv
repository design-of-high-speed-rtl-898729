// tb_controller_fsm: feeds the controller the LSB a real accumulator would
// show (the multiplier shifted right once per shift_command) and compares
// the command outputs in every cycle with the sequence the control algorithm
// prescribes: LOAD, then per multiplier bit TEST, ADD if the bit is 1, SHIFT;
// then IDLE with stop = 1. Also checks the cycle count 34 + (ones in the
// multiplier), that stop stays high while start is low, and that a start
// held high starts the next run straight away.
module tb_controller_fsm;
  localparam int N = 16;
  typedef enum logic [2:0] {E_IDLE, E_LOAD, E_TEST, E_ADD, E_SHIFT} exp_t;

  logic clock = 0, reset, start, lsb;
  logic load_c, add_c, shift_c, stop;
  logic [15:0] mreg;
  int checks = 0, failures = 0;
  int n_add = 0, n_noadd = 0, n_restart = 0;

  controller_fsm dut (
    .clock(clock), .reset(reset), .start(start), .lsb(lsb),
    .load_command(load_c), .add_command(add_c), .shift_command(shift_c),
    .stop(stop)
  );

  always #5 clock = ~clock;

  // stand-in for the accumulator's low half
  always_ff @(posedge clock)
    if (load_c)       mreg <= 16'($urandom);
    else if (shift_c) mreg <= mreg >> 1;
  assign lsb = mreg[0];

  function automatic logic [3:0] outs_of(exp_t e);
    case (e)
      E_IDLE:  return 4'b0001;   // {load, add, shift, stop}
      E_LOAD:  return 4'b1000;
      E_ADD:   return 4'b0100;
      E_SHIFT: return 4'b0010;
      default: return 4'b0000;
    endcase
  endfunction

  task automatic expect_state(input exp_t e);
    checks++;
    if ({load_c, add_c, shift_c, stop} != outs_of(e)) begin
      failures++;
      $display("FAIL at %0t: outputs l=%0b a=%0b s=%0b stop=%0b, expected %s",
               $time, load_c, add_c, shift_c, stop, e.name());
    end
  endtask

  // one multiplication; start is dropped after the first edge unless hold
  task automatic run(input logic hold);
    int cycles, ones;
    logic [15:0] m;
    start = 1;
    @(posedge clock); cycles = 1;
    @(negedge clock);
    if (!hold) start = 0;
    expect_state(E_LOAD);
    @(posedge clock); cycles++;
    @(negedge clock);
    m = mreg; ones = $countones(m);
    for (int b = 0; b < N; b++) begin
      expect_state(E_TEST);
      @(posedge clock); cycles++; @(negedge clock);
      if (m[b]) begin
        n_add++;
        expect_state(E_ADD);
        @(posedge clock); cycles++; @(negedge clock);
      end else n_noadd++;
      expect_state(E_SHIFT);
      @(posedge clock); cycles++; @(negedge clock);
    end
    expect_state(E_IDLE);
    checks++;
    if (cycles != 2 + 2 * N + ones) begin
      failures++;
      $display("FAIL cycle count %0d, expected %0d", cycles, 2 + 2 * N + ones);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1; start = 0;
    #12;
    expect_state(E_IDLE);
    @(negedge clock) reset = 0;
    repeat (3) begin
      @(negedge clock);
      expect_state(E_IDLE);
    end
    for (int r = 0; r < 20; r++) begin
      run(0);
      repeat (2) begin @(negedge clock); expect_state(E_IDLE); end
    end
    // start held high: a second run begins as soon as the first ends
    run(1);
    @(posedge clock); @(negedge clock);
    expect_state(E_LOAD);
    n_restart++;
    start = 0;
    @(posedge clock); @(negedge clock);
    expect_state(E_TEST);
    // reset in mid-run returns to IDLE
    reset = 1;
    #1 expect_state(E_IDLE);
    @(negedge clock) reset = 0;
    if (n_add == 0 || n_noadd == 0 || n_restart == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
