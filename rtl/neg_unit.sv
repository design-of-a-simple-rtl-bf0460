// neg_unit: the circuit of the negate instruction, Ra <= -Ra.
//
// An 8-way 32-bit multiplexer reads Ra (index in positions 2-4), a 32-bit
// negater forms its two's complement, and two 8-way demultiplexers
// controlled by the same index put the result on Input_N(Ra) and raise
// Set_N(Ra) alone. The outputs are candidates for the write-back stage.
//
// Purely combinational.
module neg_unit
  import sp_pkg::*;
(
  input  regs_t  regs,
  input  instr_t instr,
  output regs_t  din,
  output rset_t  set
);

  word_t ra, neg;
  logic [NREGS-1:0][0:0] set_w;

  mux_n #(.WAYS(NREGS), .WIDTH(DWIDTH)) u_mux_a (.x(regs), .sel(instr.r.a), .z(ra));

  negater #(.WIDTH(DWIDTH)) u_neg (.x(ra), .z(neg));

  demux_n #(.WAYS(NREGS), .WIDTH(DWIDTH)) u_dmx_d (.x(neg),  .sel(instr.r.a), .z(din));
  demux_n #(.WAYS(NREGS), .WIDTH(1))      u_dmx_s (.x(1'b1), .sel(instr.r.a), .z(set_w));

  assign set = rset_t'(set_w);

endmodule
