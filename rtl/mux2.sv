// mux2: 2-way 1-bit multiplexer.
//
// z follows x0 when the control y is 0 and x1 when y is 1. It is written
// as the simplified sum of products Z = (X1 and Y) or (X0 and not Y):
// two AND terms, one with y inverted, combined by an OR.
//
// Purely combinational; no clock.
module mux2 (
  input  logic x0,
  input  logic x1,
  input  logic y,
  output logic z
);

  assign z = (x1 & y) | (x0 & ~y);

endmodule
