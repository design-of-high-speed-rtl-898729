// sqrt_csla_16: 16-bit square-root carry-select adder.
// The operands are cut into five groups whose sizes grow towards the MSB:
//   bits [1:0]   2-bit ripple-carry adder, carry-in tied to 0
//   bits [3:2]   2-bit carry-select stage
//   bits [6:4]   3-bit carry-select stage
//   bits [10:7]  4-bit carry-select stage
//   bits [15:11] 5-bit carry-select stage, its carry-out is carry_out
// Each carry-select stage precomputes both possible results while the
// carry travels up from below, and the carry then passes each stage through
// one 2x1 mux: four mux delays after the first group. Growing the groups
// by one bit per stage balances a stage's ripple time against the arrival
// time of its select carry (hence "square root": about sqrt(2N) groups).
// Ports: x, y [15:0]; sum [15:0], carry_out. Combinational; there is no
// carry input, matching the grounded carry-in of the lowest group.
// The group sizes and order follow the design's adder schematic; the
// assignment of the groups to bit ranges LSB-first is read from that order.
module sqrt_csla_16 (
  input  logic [15:0] x,
  input  logic [15:0] y,
  output logic [15:0] sum,
  output logic        carry_out
);

  logic c1, c3, c6, c10;

  ripple_carry_adder #(.WIDTH(2)) rca1 (
    .x(x[1:0]), .y(y[1:0]), .carry_in(1'b0),
    .sum(sum[1:0]), .carry_out(c1)
  );

  carry_select_adder #(.WIDTH(2)) csla1 (
    .x(x[3:2]), .y(y[3:2]), .carry_in(c1),
    .sum(sum[3:2]), .carry_out(c3)
  );

  carry_select_adder #(.WIDTH(3)) csla2 (
    .x(x[6:4]), .y(y[6:4]), .carry_in(c3),
    .sum(sum[6:4]), .carry_out(c6)
  );

  carry_select_adder #(.WIDTH(4)) csla3 (
    .x(x[10:7]), .y(y[10:7]), .carry_in(c6),
    .sum(sum[10:7]), .carry_out(c10)
  );

  carry_select_adder #(.WIDTH(5)) csla4 (
    .x(x[15:11]), .y(y[15:11]), .carry_in(c10),
    .sum(sum[15:11]), .carry_out(carry_out)
  );

endmodule
