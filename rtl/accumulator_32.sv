// accumulator_32: 32-bit right-shifting accumulator of the shift-and-add
// multiplier, with a carry flip-flop above its MSB.
// The register is {carry, high[15:0], low[15:0]}. Three active-high commands,
// one per clock at most:
//   load_command  low <= multiplier, high <= 0, carry <= 0
//   add_command   high <= sum_in, carry <= carry_in (sum_in/carry_in are the
//                 adder's result of high + multiplicand); low is unchanged
//   shift_command {carry, high, low} shifts right by one, a 0 enters at the
//                 top and the old bit 0 is discarded
// With no command the register holds. lsb (bit 0) tells the controller
// whether to add; b_msb (the high half) feeds the adder; product is the
// whole 32-bit register, the finished product after 16 shifts.
// Ports: clock, reset, multiplier [15:0], sum_in [15:0], carry_in,
// load_command, add_command, shift_command; product [31:0], b_msb [15:0], lsb.
// Timing: every command takes effect at the next rising edge; reset is
// asynchronous and active high.
// The commands, the right shift, the multiplier in the low half and the
// ports follow the design. The carry flip-flop (which keeps the adder's
// carry-out so that it is shifted into bit 31) and the command priority
// load > add > shift are this design's choices; the controller never
// raises two commands at once, which an assertion checks.
module accumulator_32 (
  input  logic        clock,
  input  logic        reset,
  input  logic [15:0] multiplier,
  input  logic [15:0] sum_in,
  input  logic        carry_in,
  input  logic        load_command,
  input  logic        add_command,
  input  logic        shift_command,
  output logic [31:0] product,
  output logic [15:0] b_msb,
  output logic        lsb
);

  logic [31:0] acc;
  logic        carry;

  always_ff @(posedge clock or posedge reset) begin
    if (reset) begin
      acc   <= '0;
      carry <= 1'b0;
    end else if (load_command) begin
      acc   <= {16'h0000, multiplier};
      carry <= 1'b0;
    end else if (add_command) begin
      acc[31:16] <= sum_in;
      carry      <= carry_in;
    end else if (shift_command) begin
      acc   <= {carry, acc[31:1]};
      carry <= 1'b0;
    end
  end

  assign product = acc;
  assign b_msb   = acc[31:16];
  assign lsb     = acc[0];

  a_one_command: assert property (
    @(posedge clock) $onehot0({load_command, add_command, shift_command})
  ) else $error("accumulator_32: more than one command in a cycle");

endmodule
