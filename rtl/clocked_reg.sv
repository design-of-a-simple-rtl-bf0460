// clocked_reg: WIDTH-bit register that takes its inputs on every clock.
//
// Each bit is a clocked NOT gate (clocked_not) followed by a plain NOT
// gate: the clocked gate takes the inverted input at the clock pulse and
// holds it until the next pulse, and the plain gate restores the polarity.
// So q shows the value d had at a rising clock edge from just after that
// edge until just after the next one.
//
// The asynchronous active-low reset (to RESET_VALUE) is an addition of this
// design so that simulation and hardware start from a known state; the
// default width of 4 is that of the example register.
module clocked_reg #(
  parameter int unsigned        WIDTH       = 4,
  parameter logic [WIDTH-1:0]   RESET_VALUE = '0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  logic [WIDTH-1:0] held_n;  // outputs of the clocked NOT gates

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    clocked_not #(.RESET_VALUE(~RESET_VALUE[i])) u_cnot (
      .clk  (clk),
      .rst_n(rst_n),
      .a    (d[i]),
      .y    (held_n[i])
    );
  end

  // Unclocked NOT gates restore the polarity.
  assign q = ~held_n;

endmodule
