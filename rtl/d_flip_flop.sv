// d_flip_flop: positive-edge D flip-flop with asynchronous active-high clear.
// q takes d on each rising clock edge; reset forces q to 0 at once.
// Ports: clock, reset, d (inputs); q (output).
// The clear input follows the flip-flop schematic (a clearable D flip-flop);
// its asynchronous, active-high sense is this design's choice.
module d_flip_flop (
  input  logic clock,
  input  logic reset,
  input  logic d,
  output logic q
);

  always_ff @(posedge clock or posedge reset) begin
    if (reset) q <= 1'b0;
    else       q <= d;
  end

endmodule
