// load_unit: the circuit of the load instruction, Ra <= d.
//
// The 8-bit constant d (positions 8-15, position 15 least significant)
// goes to the 8 low-order bits of a 32-bit word whose 24 high-order bits
// are 0. An 8-way 32-bit demultiplexer controlled by a (positions 2-4)
// puts that word on Input_L(Ra), and an 8-way 1-bit demultiplexer with
// input 1 raises Set_L(Ra) alone. The outputs are candidates for the
// write-back stage.
//
// Purely combinational.
module load_unit
  import sp_pkg::*;
(
  input  instr_t instr,
  output regs_t  din,
  output rset_t  set
);

  logic [NREGS-1:0][0:0] set_w;

  demux_n #(.WAYS(NREGS), .WIDTH(DWIDTH)) u_dmx_d (
    .x  (word_t'(instr.i.d)),
    .sel(instr.r.a),
    .z  (din)
  );
  demux_n #(.WAYS(NREGS), .WIDTH(1)) u_dmx_s (.x(1'b1), .sel(instr.r.a), .z(set_w));

  assign set = rset_t'(set_w);

endmodule
