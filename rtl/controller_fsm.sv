// controller_fsm: control unit of the shift-and-add multiplier.
// A Moore machine with five states:
//   IDLE   stop = 1; waits for start = 1, then goes to LOAD
//   LOAD   load_command = 1; clears the shift counter, then goes to TEST
//   TEST   looks at the accumulator LSB: 1 -> ADD, 0 -> SHIFT
//   ADD    add_command = 1, then goes to SHIFT
//   SHIFT  shift_command = 1 and count = count + 1; after the N_BITS-th
//          shift it returns to IDLE, otherwise to TEST
// Ports: clock, reset, start, lsb; load_command, add_command,
// shift_command, stop.
// Timing: one multiplication takes 2 + 2*N_BITS + (number of 1 bits in the
// multiplier) clock edges from the edge that samples start to the edge that
// returns to IDLE (34 + ones for 16 bits). start is level-sensitive: if it is
// still high when the machine is back in IDLE a new multiplication begins.
// The states, their outputs and transitions follow the design's FSM diagram.
// The state encoding, the counter width, clearing the counter in LOAD and the
// asynchronous active-high reset are this design's choices.
module controller_fsm
  import mult_pkg::*;
#(
  parameter int unsigned N_BITS = MULT_WIDTH
) (
  input  logic clock,
  input  logic reset,
  input  logic start,
  input  logic lsb,
  output logic load_command,
  output logic add_command,
  output logic shift_command,
  output logic stop
);

  localparam int unsigned CW = $clog2(N_BITS + 1);

  ctrl_state_t    state, state_next;
  logic [CW-1:0]  count;

  always_comb begin
    state_next = state;
    unique case (state)
      ST_IDLE:  if (start) state_next = ST_LOAD;
      ST_LOAD:  state_next = ST_TEST;
      ST_TEST:  state_next = lsb ? ST_ADD : ST_SHIFT;
      ST_ADD:   state_next = ST_SHIFT;
      ST_SHIFT: state_next = (count == CW'(N_BITS - 1)) ? ST_IDLE : ST_TEST;
      default:  state_next = ST_IDLE;
    endcase
  end

  always_ff @(posedge clock or posedge reset) begin
    if (reset) begin
      state <= ST_IDLE;
      count <= '0;
    end else begin
      state <= state_next;
      if (state == ST_LOAD)       count <= '0;
      else if (state == ST_SHIFT) count <= count + 1'b1;
    end
  end

  assign stop          = (state == ST_IDLE);
  assign load_command  = (state == ST_LOAD);
  assign add_command   = (state == ST_ADD);
  assign shift_command = (state == ST_SHIFT);

endmodule
