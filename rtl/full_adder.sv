// full_adder: one-bit full adder built from two half adders and an OR gate.
// The first half adder adds x and y; the second adds carry_in to that
// partial sum. carry_out is the OR of the two half-adder carries.
// Ports: x, y, carry_in (inputs); sum, carry_out (outputs). Combinational.
// The two-half-adder structure is the design's own; nothing here is a choice
// beyond port naming.
module full_adder (
  input  logic x,
  input  logic y,
  input  logic carry_in,
  output logic sum,
  output logic carry_out
);

  logic s1, c1, c2;

  half_adder ha1 (.a(x),        .b(y),  .sum(s1),  .carry_out(c1));
  half_adder ha2 (.a(carry_in), .b(s1), .sum(sum), .carry_out(c2));

  assign carry_out = c1 | c2;

endmodule
