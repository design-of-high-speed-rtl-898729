// shift_register_16: 16-bit parallel-in, parallel-out register holding the
// multiplicand.
// Sixteen D flip-flops share one clock and one reset; flip-flop i stores
// input bit i. On every rising clock edge the whole word is loaded, so the
// output is the input delayed by one cycle; reset clears it to zero.
// Ports: clock, reset, data_in [15:0]; data_out [15:0].
// Timing: one cycle from data_in to data_out. There is no load enable, as in
// the design: the multiplicand must be held steady while a product is being
// computed. Reset is asynchronous and active high (this design's choice).
module shift_register_16 (
  input  logic        clock,
  input  logic        reset,
  input  logic [15:0] data_in,
  output logic [15:0] data_out
);

  for (genvar i = 0; i < 16; i++) begin : g_dff
    d_flip_flop dff (
      .clock(clock),
      .reset(reset),
      .d    (data_in[i]),
      .q    (data_out[i])
    );
  end

endmodule
