// mux_2x1: 2-to-1 multiplexer, WIDTH bits wide.
// op = ip1 when se = 0, op = ip2 when se = 1. Combinational.
// Ports: ip1, ip2 [WIDTH-1:0], se; op [WIDTH-1:0].
// Port names and the select sense (ip1 is data input 0) follow the mux
// schematic; the WIDTH parameter is this design's own, so one module serves
// both the multi-bit sum select and the one-bit carry select of a
// carry-select stage.
module mux_2x1 #(
  parameter int unsigned WIDTH = 1
) (
  input  logic [WIDTH-1:0] ip1,
  input  logic [WIDTH-1:0] ip2,
  input  logic             se,
  output logic [WIDTH-1:0] op
);

  always_comb begin
    if (se) op = ip2;
    else    op = ip1;
  end

endmodule
