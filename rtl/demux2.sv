// demux2: 2-way 1-bit demultiplexer.
//
// Sends the input x to output z0 when the control y is 0 and to z1 when
// y is 1; the unselected output is 0. Z0 = X and not Y, Z1 = X and Y.
//
// Purely combinational; no clock.
module demux2 (
  input  logic x,
  input  logic y,
  output logic z0,
  output logic z1
);

  assign z0 = x & ~y;
  assign z1 = x & y;

endmodule
