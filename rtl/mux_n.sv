// mux_n: WAYS-way WIDTH-bit multiplexer.
//
// Passes input x[sel] to z. The processor uses it as an 8-way 32-bit
// multiplexer to read a data register, as a 256-way 16-bit multiplexer to
// pick the instruction addressed by the PC, and at other sizes where a
// choice between whole words is needed.
//
// It is built from 2-way 1-bit multiplexers (mux2) as a binary tree of
// log2(WAYS) rows. The first row, controlled by select bit 0, halves the
// number of candidate words by choosing within each adjacent pair; each
// further row does the same with the next select bit, and the last row,
// controlled by the most significant select bit, leaves one word. The tree
// is this design's way of generalising the 2-way circuit to any
// power-of-two size.
//
// Purely combinational; log2(WAYS) mux2 delays from input to output.
// WAYS must be a power of two, at least 2.
module mux_n #(
  parameter int unsigned WAYS  = 8,
  parameter int unsigned WIDTH = 32,
  localparam int unsigned SELW = $clog2(WAYS)
) (
  input  logic [WAYS-1:0][WIDTH-1:0] x,
  input  logic [SELW-1:0]            sel,
  output logic [WIDTH-1:0]           z
);

  if (WAYS < 2 || (1 << SELW) != WAYS) begin : g_bad_size
    $error("mux_n: WAYS must be a power of two, at least 2");
  end

  // Level 0 holds the WAYS inputs; level l holds WAYS >> l words, each
  // chosen by a mux2 row from a pair of level l-1 words that differ only in
  // select bit l-1. Level SELW is the single output word.
  for (genvar l = 0; l <= SELW; l++) begin : g_lvl
    logic [(WAYS >> l)-1:0][WIDTH-1:0] v;
    if (l == 0) begin : g_in
      assign v = x;
    end else begin : g_row
      for (genvar k = 0; k < (WAYS >> l); k++) begin : g_node
        for (genvar b = 0; b < WIDTH; b++) begin : g_bit
          mux2 u_mux (
            .x0(g_lvl[l-1].v[2*k][b]),
            .x1(g_lvl[l-1].v[2*k+1][b]),
            .y (sel[l-1]),
            .z (v[k][b])
          );
        end
      end
    end
  end

  assign z = g_lvl[SELW].v[0];

endmodule
