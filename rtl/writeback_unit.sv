// writeback_unit: chooses what is stored into the data registers and PC.
//
// The add, negate and load circuits each offer new register inputs and
// set bits; the instruction type (positions 0-1) picks one of them through
// 4-way multiplexers. For jiz no data register is written (all set bits 0).
// The next PC is the jump circuit's Input_J(PC) for jiz and Increment(PC)
// for every other instruction, since the PC's set bit is always 1.
//
// Purely combinational.
module writeback_unit
  import sp_pkg::*;
(
  input  instr_t instr,
  input  regs_t  din_a,
  input  rset_t  set_a,
  input  regs_t  din_n,
  input  rset_t  set_n,
  input  regs_t  din_l,
  input  rset_t  set_l,
  input  pc_t    pc_inc,
  input  pc_t    pc_jump,
  output regs_t  din,
  output rset_t  set,
  output pc_t    pc_next
);

  localparam int unsigned REGBITS = NREGS * DWIDTH;

  opcode_e op;
  assign op = instr.r.op;

  // Inputs indexed by opcode value: add, neg, lod, jiz.
  mux_n #(.WAYS(4), .WIDTH(REGBITS)) u_mux_din (
    .x  ({regs_t'('0), din_l, din_n, din_a}),
    .sel(op),
    .z  (din)
  );

  mux_n #(.WAYS(4), .WIDTH(NREGS)) u_mux_set (
    .x  ({rset_t'('0), set_l, set_n, set_a}),
    .sel(op),
    .z  (set)
  );

  mux_n #(.WAYS(2), .WIDTH(PCWIDTH)) u_mux_pc (
    .x  ({pc_jump, pc_inc}),
    .sel(op == OP_JIZ),
    .z  (pc_next)
  );

endmodule
