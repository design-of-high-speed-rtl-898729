// carry_select_adder: WIDTH-bit carry-select stage.
// Two WIDTH-bit ripple-carry adders add x and y at the same time, one with
// carry-in tied to 0 and one tied to 1. When the real carry_in arrives, two
// 2x1 multiplexers pick the matching sum and carry-out, so the stage adds only
// one mux delay to the carry path once its own adders have settled.
// Ports: x, y [WIDTH-1:0], carry_in; sum [WIDTH-1:0], carry_out.
// Combinational. The structure (two RCAs, sum mux, carry mux) follows the
// carry-select schematics of the design, which show 2-, 3-, 4- and 5-bit
// versions; the default of 2 is the smallest of them.
module carry_select_adder #(
  parameter int unsigned WIDTH = 2
) (
  input  logic [WIDTH-1:0] x,
  input  logic [WIDTH-1:0] y,
  input  logic             carry_in,
  output logic [WIDTH-1:0] sum,
  output logic             carry_out
);

  logic [WIDTH-1:0] sum0, sum1;
  logic             cout0, cout1;

  ripple_carry_adder #(.WIDTH(WIDTH)) rca1 (
    .x(x), .y(y), .carry_in(1'b0), .sum(sum0), .carry_out(cout0)
  );

  ripple_carry_adder #(.WIDTH(WIDTH)) rca2 (
    .x(x), .y(y), .carry_in(1'b1), .sum(sum1), .carry_out(cout1)
  );

  mux_2x1 #(.WIDTH(WIDTH)) sum_mux (
    .ip1(sum0), .ip2(sum1), .se(carry_in), .op(sum)
  );

  mux_2x1 #(.WIDTH(1)) carry_mux (
    .ip1(cout0), .ip2(cout1), .se(carry_in), .op(carry_out)
  );

endmodule
