// program_registers: the program registers P0..P255.
//
// Each is a 16-bit set_reg holding one instruction. While the processor
// runs, every set bit is 0, so the program never changes. To put a
// program in, this design adds a load port: when load_en is 1 at a rising
// clock edge, P[load_addr] takes load_data. The set bits are produced by a
// 256-way 1-bit demultiplexer driven by load_en and load_addr.
//
// The registers have no reset: their contents are whatever was loaded.
// dout is Output(P0)..Output(P255), all visible at once, as the
// instruction extractor needs.
module program_registers
  import sp_pkg::*;
(
  input  logic   clk,
  input  logic   load_en,
  input  pc_t    load_addr,
  input  instr_t load_data,
  output prog_t  dout
);

  logic [NPROG-1:0][0:0] set;

  demux_n #(.WAYS(NPROG), .WIDTH(1)) u_set (
    .x  (load_en),
    .sel(load_addr),
    .z  (set)
  );

  for (genvar i = 0; i < NPROG; i++) begin : g_p
    set_reg #(.WIDTH(IWIDTH)) u_p (
      .clk  (clk),
      .rst_n(1'b1),
      .s    (set[i][0]),
      .d    (load_data),
      .q    (dout[i])
    );
  end

endmodule
