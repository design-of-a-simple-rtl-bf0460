// fetch_unit: instruction extractor and PC incrementer.
//
// A 256-way 16-bit multiplexer controlled by the PC picks the current
// instruction I out of the program registers, and an 8-bit adder forms
// Increment(PC) = PC + 1 (wrapping from 255 to 0). Whether the PC actually
// takes the incremented value is decided later, by the instruction.
//
// Purely combinational: instr and pc_inc follow pc within the same cycle.
module fetch_unit
  import sp_pkg::*;
(
  input  prog_t  prog,
  input  pc_t    pc,
  output instr_t instr,
  output pc_t    pc_inc
);

  mux_n #(.WAYS(NPROG), .WIDTH(IWIDTH)) u_extract (
    .x  (prog),
    .sel(pc),
    .z  (instr)
  );

  adder #(.WIDTH(PCWIDTH)) u_inc (
    .a(pc),
    .b(pc_t'(1)),
    .c(pc_inc)
  );

endmodule
