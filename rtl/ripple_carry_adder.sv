// ripple_carry_adder: WIDTH-bit ripple-carry adder.
// WIDTH full adders are chained LSB to MSB, each passing its carry to the
// next. {carry_out, sum} = x + y + carry_in. Combinational; the delay grows
// linearly with WIDTH.
// Ports: x, y [WIDTH-1:0], carry_in; sum [WIDTH-1:0], carry_out.
// The design uses 2-, 3-, 4- and 5-bit instances; one parameterised module
// covers all four. The default of 2 is the smallest of them.
module ripple_carry_adder #(
  parameter int unsigned WIDTH = 2
) (
  input  logic [WIDTH-1:0] x,
  input  logic [WIDTH-1:0] y,
  input  logic             carry_in,
  output logic [WIDTH-1:0] sum,
  output logic             carry_out
);

  logic [WIDTH:0] c;

  assign c[0] = carry_in;

  for (genvar i = 0; i < WIDTH; i++) begin : g_fa
    full_adder fa (
      .x        (x[i]),
      .y        (y[i]),
      .carry_in (c[i]),
      .sum      (sum[i]),
      .carry_out(c[i+1])
    );
  end

  assign carry_out = c[WIDTH];

endmodule
