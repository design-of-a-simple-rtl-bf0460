// negater: WIDTH-bit two's complement negation, z = -x.
//
// Inverts every bit of x and adds 1 with an adder. The most negative value
// (only the top bit set) maps to itself, as two's complement requires.
//
// Purely combinational.
module negater #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] x,
  output logic [WIDTH-1:0] z
);

  adder #(.WIDTH(WIDTH)) u_inc (
    .a(~x),
    .b(WIDTH'(1)),
    .c(z)
  );

endmodule
