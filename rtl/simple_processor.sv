// simple_processor: a single-cycle processor with four instructions.
//
// State: data registers R0..R7 (32 bits, R0 = 0 and R1 = 1 fixed),
// program registers P0..P255 (16 bits) and an 8-bit PC whose set bit is
// always 1. Every rising clock edge completes one instruction:
//   fetch_unit      picks I = P[PC] and forms PC + 1,
//   add_unit        Rc <= Ra + Rb           (type 00)
//   neg_unit        Ra <= -Ra               (type 01)
//   load_unit       Ra <= zero-extended d   (type 10)
//   jump_unit       PC <= d if Ra == 0      (type 11)
//   writeback_unit  selects, by type, the register inputs, set bits and
//                   next PC, which the registers take at the clock edge.
// All four instruction circuits work in parallel on every instruction;
// the write-back selection decides which result counts.
//
// Program loading (this design's addition): hold rst_n low and write
// instructions through prog_we / prog_addr / prog_data, one per clock.
// After rst_n rises execution starts at P0, with R2..R7 = 0. There is no
// halt instruction; a program stops by jumping to itself (jiz R0 -> here).
//
// The load-port assertion samples rst_n at the clock edge while the
// registers use it as an asynchronous reset; lint notes that rst_n is used
// both ways. The assertion is a check only and adds no logic.
//
// Observation ports: pc, the instruction being executed (instr) and all
// data registers (regs), each valid throughout the cycle.
module simple_processor
  import sp_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   prog_we,
  input  pc_t    prog_addr,
  input  instr_t prog_data,
  output pc_t    pc,
  output instr_t instr,
  output regs_t  regs
);

  prog_t prog;
  pc_t   pc_inc, pc_jump, pc_next;
  regs_t din_a, din_n, din_l, din;
  rset_t set_a, set_n, set_l, set;

  program_registers u_prog (
    .clk      (clk),
    .load_en  (prog_we),
    .load_addr(prog_addr),
    .load_data(prog_data),
    .dout     (prog)
  );

  // Program counter: set bit tied to 1, so it changes every cycle.
  set_reg #(.WIDTH(PCWIDTH)) u_pc (
    .clk  (clk),
    .rst_n(rst_n),
    .s    (1'b1),
    .d    (pc_next),
    .q    (pc)
  );

  data_registers u_regs (
    .clk  (clk),
    .rst_n(rst_n),
    .set  (set),
    .din  (din),
    .dout (regs)
  );

  fetch_unit u_fetch (.prog(prog), .pc(pc), .instr(instr), .pc_inc(pc_inc));

  add_unit  u_add  (.regs(regs), .instr(instr), .din(din_a), .set(set_a));
  neg_unit  u_neg  (.regs(regs), .instr(instr), .din(din_n), .set(set_n));
  load_unit u_load (.instr(instr), .din(din_l), .set(set_l));
  jump_unit u_jump (.regs(regs), .instr(instr), .pc_inc(pc_inc), .pc_next(pc_jump));

  writeback_unit u_wb (
    .instr  (instr),
    .din_a  (din_a),
    .set_a  (set_a),
    .din_n  (din_n),
    .set_n  (set_n),
    .din_l  (din_l),
    .set_l  (set_l),
    .pc_inc (pc_inc),
    .pc_jump(pc_jump),
    .din    (din),
    .set    (set),
    .pc_next(pc_next)
  );

  // The program registers are written only while the processor is held
  // in reset.
  a_load_in_reset: assert property (@(posedge clk) prog_we |-> !rst_n)
    else $error("program registers written while the processor runs");

endmodule
