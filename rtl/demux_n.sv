// demux_n: WAYS-way WIDTH-bit demultiplexer.
//
// Sends the input x to output z[sel]; every other output is 0. The
// processor uses it with WIDTH 32 to route a result to the data register
// an instruction names, and with WIDTH 1 and x tied to 1 to raise that
// register's set bit alone.
//
// It is built from 2-way 1-bit demultiplexers (demux2) as a binary tree of
// log2(WAYS) rows. The first row, controlled by the most significant
// select bit, sends x to the lower or the upper half; each further row
// splits every word again under the next lower select bit. A demux2 whose
// input is 0 outputs 0 on both sides, so every unselected output is 0. The
// tree is this design's way of generalising the 2-way circuit.
//
// Purely combinational. WAYS must be a power of two, at least 2.
module demux_n #(
  parameter int unsigned WAYS  = 8,
  parameter int unsigned WIDTH = 32,
  localparam int unsigned SELW = $clog2(WAYS)
) (
  input  logic [WIDTH-1:0]           x,
  input  logic [SELW-1:0]            sel,
  output logic [WAYS-1:0][WIDTH-1:0] z
);

  if (WAYS < 2 || (1 << SELW) != WAYS) begin : g_bad_size
    $error("demux_n: WAYS must be a power of two, at least 2");
  end

  // Level 0 is the input word; level l holds 2**l words, word j of level
  // l-1 being split by a demux2 row into words 2j and 2j+1 of level l under
  // select bit SELW-l. Level SELW is the WAYS outputs.
  for (genvar l = 0; l <= SELW; l++) begin : g_lvl
    logic [(1 << l)-1:0][WIDTH-1:0] v;
    if (l == 0) begin : g_in
      assign v = x;
    end else begin : g_row
      for (genvar j = 0; j < (1 << (l - 1)); j++) begin : g_node
        for (genvar b = 0; b < WIDTH; b++) begin : g_bit
          demux2 u_dmx (
            .x (g_lvl[l-1].v[j][b]),
            .y (sel[SELW-l]),
            .z0(v[2*j][b]),
            .z1(v[2*j+1][b])
          );
        end
      end
    end
  end

  assign z = g_lvl[SELW].v;

endmodule
