// sp_pkg: sizes, types and instruction-field helpers shared by the simple
// processor.
//
// The machine has eight 32-bit data registers R0..R7, 256 16-bit program
// registers P0..P255 and an 8-bit program counter. These sizes are fixed by
// the instruction format: a register index is 3 bits wide and a jump target
// or load constant is 8 bits wide.
//
// Instruction bit positions are numbered 0..15 from the left, with position
// 0 the most significant bit of the 16-bit word and position 15 the least
// significant; position p is bit 15-p of the packed word instr_t:
//
//   positions  0-1   2-4   5-7   8-10  11-15
//   add        00    a     b     c     00000     Rc <= Ra + Rb
//   neg        01    a     000   000   00000     Ra <= -Ra
//   lod        10    a     000   d (positions 8-15)   Ra <= zero-extended d
//   jiz        11    a     000   d (positions 8-15)   PC <= d if Ra == 0
//
// Multi-bit fields are read as binary numbers with their leftmost position
// most significant (so position 15 is the least significant bit of d, and
// position 4 the least significant bit of a). The opcode of jiz (11) is
// the one value of the two type bits left over by the other three
// instructions.
package sp_pkg;

  localparam int NREGS   = 8;    // data registers R0..R7
  localparam int DWIDTH  = 32;   // data register width
  localparam int NPROG   = 256;  // program registers P0..P255
  localparam int IWIDTH  = 16;   // instruction width
  localparam int PCWIDTH = 8;    // program counter width
  localparam int RIDX    = 3;    // register index width

  typedef logic [DWIDTH-1:0]             word_t;
  typedef logic [PCWIDTH-1:0]            pc_t;
  typedef logic [RIDX-1:0]               ridx_t;
  typedef logic [NREGS-1:0][DWIDTH-1:0]  regs_t;   // one word per data register
  typedef logic [NREGS-1:0]              rset_t;   // one set bit per data register
  typedef logic [NPROG-1:0][IWIDTH-1:0]  prog_t;   // contents of P0..P255

  typedef enum logic [1:0] {
    OP_ADD = 2'b00,
    OP_NEG = 2'b01,
    OP_LOD = 2'b10,
    OP_JIZ = 2'b11
  } opcode_e;

  // Instruction word. Both views are 16 bits, most significant first,
  // so .op is positions 0-1, .a positions 2-4 in either view.
  typedef struct packed {
    opcode_e    op;      // positions 0-1
    ridx_t      a;       // positions 2-4
    ridx_t      b;       // positions 5-7
    ridx_t      c;       // positions 8-10
    logic [4:0] unused;  // positions 11-15
  } rrr_fmt_t;           // add, neg

  typedef struct packed {
    opcode_e    op;      // positions 0-1
    ridx_t      a;       // positions 2-4
    logic [2:0] zero;    // positions 5-7
    pc_t        d;       // positions 8-15
  } imm_fmt_t;           // lod, jiz

  typedef union packed {
    rrr_fmt_t r;
    imm_fmt_t i;
  } instr_t;

  // Encoders, used by testbenches to build programs.
  function automatic instr_t enc_add(ridx_t a, ridx_t b, ridx_t c);
    return instr_t'({OP_ADD, a, b, c, 5'b00000});
  endfunction

  function automatic instr_t enc_neg(ridx_t a);
    return instr_t'({OP_NEG, a, 11'b0});
  endfunction

  function automatic instr_t enc_lod(ridx_t a, pc_t d);
    return instr_t'({OP_LOD, a, 3'b000, d});
  endfunction

  function automatic instr_t enc_jiz(ridx_t a, pc_t d);
    return instr_t'({OP_JIZ, a, 3'b000, d});
  endfunction

endpackage
