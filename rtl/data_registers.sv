// data_registers: the data registers R0..R7 of the simple processor.
//
// R2..R7 are 32-bit set_regs: at each rising clock edge register i takes
// din[i] if set[i] is 1 and otherwise keeps its value. R0 and R1 hold the
// constants 0 and 1 permanently, so programs always have both at hand;
// their set bits and inputs are ignored (an instruction that names R0 or
// R1 as its destination changes nothing). That is why lint reports
// set[1:0] and din[1] / din[0] as unused: the ports keep one entry per
// register so that every unit can address all eight alike.
//
// Interface: dout[i] is Output(Ri), din[i] is Input(Ri), set[i] is
// Set(Ri). New values appear on dout just after the clock edge.
// Reset (asynchronous, active low) clears R2..R7; the reset itself is this
// design's addition.
module data_registers
  import sp_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  rset_t set,
  input  regs_t din,
  output regs_t dout
);

  assign dout[0] = word_t'(0);
  assign dout[1] = word_t'(1);

  for (genvar i = 2; i < NREGS; i++) begin : g_reg
    set_reg #(.WIDTH(DWIDTH)) u_r (
      .clk  (clk),
      .rst_n(rst_n),
      .s    (set[i]),
      .d    (din[i]),
      .q    (dout[i])
    );
  end

endmodule
