// set_reg: WIDTH-bit register with a set bit S.
//
// At a clock pulse with s = 1 the register takes its inputs d; with s = 0
// it ignores them and keeps its value. It is built as a clocked_reg whose
// input comes, bit by bit, from a 2-way 1-bit multiplexer (mux2) choosing
// between the register's own output (s = 0) and the new input (s = 1).
//
// Timing: q changes only just after a rising clock edge at which s was 1.
// Asynchronous active-low reset to RESET_VALUE (this design's addition).
module set_reg #(
  parameter int unsigned        WIDTH       = 4,
  parameter logic [WIDTH-1:0]   RESET_VALUE = '0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             s,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  logic [WIDTH-1:0] next;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    mux2 u_mux (.x0(q[i]), .x1(d[i]), .y(s), .z(next[i]));
  end

  clocked_reg #(.WIDTH(WIDTH), .RESET_VALUE(RESET_VALUE)) u_reg (
    .clk  (clk),
    .rst_n(rst_n),
    .d    (next),
    .q    (q)
  );

endmodule
