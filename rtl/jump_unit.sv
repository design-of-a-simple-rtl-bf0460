// jump_unit: the circuit of the jump-if-zero instruction.
//
// An 8-way 32-bit multiplexer reads Ra (index in positions 2-4). A 32-bit
// OR of its bits followed by a NOT gives 1 exactly when Ra is 0. That bit
// controls a 2-way 8-bit multiplexer whose input 0 is Increment(PC) and
// whose input 1 is the target d (positions 8-15), giving Input_J(PC):
// d when Ra is 0, PC + 1 otherwise. The write-back stage uses it only when
// the instruction type is jiz.
//
// Purely combinational.
module jump_unit
  import sp_pkg::*;
(
  input  regs_t  regs,
  input  instr_t instr,
  input  pc_t    pc_inc,
  output pc_t    pc_next
);

  word_t ra;
  logic  ra_zero;

  mux_n #(.WAYS(NREGS), .WIDTH(DWIDTH)) u_mux_a (.x(regs), .sel(instr.r.a), .z(ra));

  assign ra_zero = ~(|ra);

  mux_n #(.WAYS(2), .WIDTH(PCWIDTH)) u_mux_pc (
    .x  ({instr.i.d, pc_inc}),
    .sel(ra_zero),
    .z  (pc_next)
  );

endmodule
