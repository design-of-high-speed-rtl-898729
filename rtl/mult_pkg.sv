// mult_pkg: constants and types shared by the shift-and-add multiplier.
// MULT_WIDTH is the operand width (16 bits, the design's only size: the
// square-root carry-select adder is laid out for exactly 16 bits). The
// controller state type follows the five states of the control FSM; the
// acc_cmd_t struct bundles the three accumulator commands the controller
// issues (load, add, shift), all active high.
package mult_pkg;

  localparam int unsigned MULT_WIDTH = 16;

  typedef enum logic [2:0] {
    ST_IDLE  = 3'd0,
    ST_LOAD  = 3'd1,
    ST_TEST  = 3'd2,
    ST_ADD   = 3'd3,
    ST_SHIFT = 3'd4
  } ctrl_state_t;

  typedef struct packed {
    logic load;
    logic add;
    logic shift;
  } acc_cmd_t;

endpackage
