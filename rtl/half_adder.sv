// half_adder: one-bit half adder.
// sum = a XOR b, carry_out = a AND b. Purely combinational.
// Ports: a, b (inputs); sum, carry_out (outputs).
// Gate structure (XOR for the sum, AND for the carry) follows the
// half-adder schematic of the design.
module half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic carry_out
);

  assign sum       = a ^ b;
  assign carry_out = a & b;

endmodule
