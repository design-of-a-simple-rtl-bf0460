// add_unit: the circuit of the add instruction, Rc <= Ra + Rb.
//
// Two 8-way 32-bit multiplexers read Ra (index in positions 2-4) and Rb
// (positions 5-7); a 32-bit adder sums them; an 8-way 32-bit
// demultiplexer controlled by c (positions 8-10) places the sum on
// Input_A(Rc), and an 8-way 1-bit demultiplexer with input 1 raises
// Set_A(Rc) alone. The outputs are candidates: the write-back stage uses
// them only when the instruction type is add.
//
// Purely combinational.
module add_unit
  import sp_pkg::*;
(
  input  regs_t  regs,
  input  instr_t instr,
  output regs_t  din,
  output rset_t  set
);

  word_t ra, rb, sum;
  logic [NREGS-1:0][0:0] set_w;

  mux_n #(.WAYS(NREGS), .WIDTH(DWIDTH)) u_mux_a (.x(regs), .sel(instr.r.a), .z(ra));
  mux_n #(.WAYS(NREGS), .WIDTH(DWIDTH)) u_mux_b (.x(regs), .sel(instr.r.b), .z(rb));

  adder #(.WIDTH(DWIDTH)) u_add (.a(ra), .b(rb), .c(sum));

  demux_n #(.WAYS(NREGS), .WIDTH(DWIDTH)) u_dmx_d (.x(sum),  .sel(instr.r.c), .z(din));
  demux_n #(.WAYS(NREGS), .WIDTH(1))      u_dmx_s (.x(1'b1), .sel(instr.r.c), .z(set_w));

  assign set = rset_t'(set_w);

endmodule
