// risc_pkg: types and constants shared by the blocks of the 16-bit RISC
// processor.
//
// The opcode set and its 4-bit encoding are the sixteen ALU operations of the
// processor's operation table (ADD = 0000 ... SHL = 1111). The widths (16-bit
// instructions and data words, 32-bit ALU result, 16-entry memories, 8-bit
// program counter input) are the design's published sizes.
//
// The default memory images are this design's own: no program or data set is
// published, so IM_DEFAULT and DM_DEFAULT are chosen so that a run from
// address 0 steps through all sixteen opcodes once, in order, with the
// operand values seen in the published simulation trace (Rx/Ry = 000F/000F,
// 000F/0007, 000F/0005, 0008/0008, 0007/0080, 0010/000F, 000F/0000,
// 0005/0010, 0005/0005, 0005/0007, 0005/000F).
package risc_pkg;

  localparam int unsigned INSTR_W  = 16;  // instruction word
  localparam int unsigned DATA_W   = 16;  // data word, Rx and Ry
  localparam int unsigned RESULT_W = 32;  // ALU result
  localparam int unsigned PC_W     = 8;   // program counter / pc_in
  localparam int unsigned IM_DEPTH = 16;  // instruction memory locations
  localparam int unsigned DM_DEPTH = 16;  // data memory locations
  localparam int unsigned REG_AW   = 4;   // Rdx / Rdy address width

  // ALU operation, instr[15:12].
  typedef enum logic [3:0] {
    OP_ADD  = 4'b0000,  // Rx + Ry
    OP_SUB  = 4'b0001,  // Rx - Ry
    OP_MUL  = 4'b0010,  // Rx * Ry
    OP_DIV  = 4'b0011,  // Rx / Ry
    OP_MOD  = 4'b0100,  // Rx % Ry
    OP_INC  = 4'b0101,  // Rx + 1
    OP_DEC  = 4'b0110,  // Rx - 1
    OP_AND  = 4'b0111,  // Rx & Ry
    OP_OR   = 4'b1000,  // Rx | Ry
    OP_NOT  = 4'b1001,  // ~Rx
    OP_XOR  = 4'b1010,  // Rx ^ Ry
    OP_XNOR = 4'b1011,  // Rx ~^ Ry
    OP_NAND = 4'b1100,  // ~(Rx & Ry)
    OP_NOR  = 4'b1101,  // ~(Rx | Ry)
    OP_SHR  = 4'b1110,  // Rx >> Ry (logical)
    OP_SHL  = 4'b1111   // Rx << Ry (logical)
  } alu_op_e;

  // Instruction layout: [15:12] opcode, [11:8] unused, [7:4] Rdx, [3:0] Rdy.
  typedef struct packed {
    alu_op_e           op;
    logic [3:0]        unused;
    logic [REG_AW-1:0] rdx;
    logic [REG_AW-1:0] rdy;
  } instr_t;

  typedef logic [IM_DEPTH-1:0][INSTR_W-1:0] im_image_t;
  typedef logic [DM_DEPTH-1:0][DATA_W-1:0]  dm_image_t;

  // Default program, entry k at address k (packed: entry 0 is rightmost).
  localparam im_image_t IM_DEFAULT = {
    16'hF221,  // 15 SHL  a[2] << a[1]   = 0005 << 0007
    16'hE220,  // 14 SHR  a[2] >> a[0]   = 0005 >> 000F
    16'hD221,  // 13 NOR  a[2], a[1]     = 0005, 0007
    16'hC222,  // 12 NAND a[2], a[2]     = 0005, 0005
    16'hB225,  // 11 XNOR a[2], a[5]     = 0005, 0010
    16'hA006,  // 10 XOR  a[0], a[6]     = 000F, 0000
    16'h9002,  //  9 NOT  a[0]           = 000F
    16'h8050,  //  8 OR   a[5], a[0]     = 0010, 000F
    16'h7014,  //  7 AND  a[1], a[4]     = 0007, 0080
    16'h6033,  //  6 DEC  a[3]           = 0008
    16'h5033,  //  5 INC  a[3]           = 0008
    16'h4002,  //  4 MOD  a[0], a[2]     = 000F, 0005
    16'h3002,  //  3 DIV  a[0], a[2]     = 000F, 0005
    16'h2001,  //  2 MUL  a[0], a[1]     = 000F, 0007
    16'h1000,  //  1 SUB  a[0], a[0]     = 000F, 000F
    16'h0034   //  0 ADD  a[0], a[0]: opcode 0000 ignores its fields 3, 4
  };

  // Default data memory 'a', entry k at address k.
  localparam dm_image_t DM_DEFAULT = {
    16'hFFFF, 16'h8000, 16'h1234, 16'h00FF,
    16'h0003, 16'h0100, 16'h0001, 16'h0020,
    16'h0000, 16'h0000, 16'h0010, 16'h0080,
    16'h0008, 16'h0005, 16'h0007, 16'h000F
  };

endpackage
