// clocked_not: a clocked NOT gate.
//
// A clocked gate applies its gate function only at a clock pulse and holds
// its output unchanged between pulses. Here the function is NOT: at each
// rising clock edge y becomes ~a, and it keeps that value until the next
// edge. In hardware this is one flip-flop with an inverter on its input.
//
// The clock pulse is taken to be the rising edge, and the asynchronous
// active-low reset, which forces y to RESET_VALUE, is an addition of this
// design.
module clocked_not #(
  parameter logic RESET_VALUE = 1'b1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic a,
  output logic y
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) y <= RESET_VALUE;
    else        y <= ~a;
  end

endmodule
