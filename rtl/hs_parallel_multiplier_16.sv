// hs_parallel_multiplier_16: 16 x 16 -> 32-bit unsigned shift-and-add
// multiplier whose add step uses a 16-bit square-root carry-select adder.
// Four blocks share one clock and one reset:
//   shift_register_16  holds the multiplicand (reloaded every clock)
//   sqrt_csla_16       adds the multiplicand to the accumulator's high half
//   accumulator_32     {carry, high, low}; the multiplier is loaded into the
//                      low half and the product builds up as it shifts right
//   controller_fsm     LOAD, then 16 x (TEST, [ADD if lsb = 1], SHIFT)
// Each shift moves one multiplier bit out of the bottom of the accumulator;
// each add puts multiplicand x 2^16 into the top, so after 16 shifts the
// register holds multiplicand x multiplier.
// Ports: clock, reset, start, multiplicand [15:0], multiplier [15:0];
// product [31:0], stop.
// Protocol: hold multiplicand and multiplier steady, raise start for at least
// one clock while stop = 1, then drop it. stop falls, and rises again when
// product is valid, 34 + (number of 1 bits in multiplier) clock edges after
// the edge that sampled start. product stays valid until the next start.
// The multiplicand register samples its input every clock, so the
// multiplicand must be stable from one cycle before start until stop.
// The blocks, their ports and their wiring follow the design's block
// diagram; reset is asynchronous and active high (this design's choice).
module hs_parallel_multiplier_16 (
  input  logic        clock,
  input  logic        reset,
  input  logic        start,
  input  logic [15:0] multiplicand,
  input  logic [15:0] multiplier,
  output logic [31:0] product,
  output logic        stop
);

  import mult_pkg::*;

  logic [15:0] mcand_q;
  logic [15:0] b_msb;
  logic [15:0] sum;
  logic        carry_out;
  logic        lsb;
  acc_cmd_t    cmd;

  shift_register_16 block1 (
    .clock   (clock),
    .reset   (reset),
    .data_in (multiplicand),
    .data_out(mcand_q)
  );

  sqrt_csla_16 block2 (
    .x        (mcand_q),
    .y        (b_msb),
    .sum      (sum),
    .carry_out(carry_out)
  );

  accumulator_32 block3 (
    .clock        (clock),
    .reset        (reset),
    .multiplier   (multiplier),
    .sum_in       (sum),
    .carry_in     (carry_out),
    .load_command (cmd.load),
    .add_command  (cmd.add),
    .shift_command(cmd.shift),
    .product      (product),
    .b_msb        (b_msb),
    .lsb          (lsb)
  );

  controller_fsm #(.N_BITS(MULT_WIDTH)) block4 (
    .clock        (clock),
    .reset        (reset),
    .start        (start),
    .lsb          (lsb),
    .load_command (cmd.load),
    .add_command  (cmd.add),
    .shift_command(cmd.shift),
    .stop         (stop)
  );

endmodule
