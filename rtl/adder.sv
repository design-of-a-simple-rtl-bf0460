// adder: WIDTH-bit binary adder, c = a + b.
//
// The carry out of the top bit is dropped, so the sum wraps modulo
// 2**WIDTH; for 32-bit operands this is two's complement addition. The
// processor has a 32-bit one for the add instruction and an 8-bit one that
// increments the PC. Written with the + operator rather than as a chain of
// full adders; synthesis picks the adder structure.
//
// Purely combinational.
module adder #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] c
);

  assign c = a + b;

endmodule
