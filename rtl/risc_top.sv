// risc_top: the complete 16-bit RISC processor.
//
// Four units form a two-stage pipeline that issues one instruction per
// clock:
//   fetch/decode  program counter -> instruction memory -> decoder, which
//                 sends the opcode to the alu_in register and the operand
//                 addresses Rdx/Rdy to the data register, which loads
//                 a[Rdx], a[Rdy] into Rx, Ry
//   execute       ALU computes alu_in(Rx, Ry) into the 32-bit alu_out
// There are no branches, no stores and no write-back, so no hazards: the
// program counter simply steps through the 16-word program and wraps.
//
// Interface: clk, rst (synchronous, active high), pc_in (8-bit start
// address, loaded while rst is high). The outputs are the signals watched on
// the running hardware: alu_in (opcode), rx, ry (operands) and alu_out
// (result). 1 + 1 + 8 + 4 + 16 + 16 + 32 = 78 pins. The program counter
// stays internal (it is not among the published outputs), so the fetch
// unit's pc output is left unused here.
// Timing: after rst falls, the instruction at pc_in reaches alu_in/rx/ry on
// the first clock edge and its result reaches alu_out on the second; after
// that one instruction completes per cycle, its result one cycle behind its
// alu_in/rx/ry. While rst is high all outputs read 0.
//
// The units, their connections, the port list and widths follow the
// published design; the pipeline registers between the units and the reset
// behaviour are this design's choices, made to reproduce the published
// simulation trace.
module risc_top
  import risc_pkg::*;
#(
  parameter logic [IM_DEPTH-1:0][INSTR_W-1:0] IM_INIT = IM_DEFAULT,
  parameter logic [DM_DEPTH-1:0][DATA_W-1:0]  DM_INIT = DM_DEFAULT
) (
  input  logic                clk,
  input  logic                rst,
  input  logic [PC_W-1:0]     pc_in,
  output logic [3:0]          alu_in,
  output logic [DATA_W-1:0]   rx,
  output logic [DATA_W-1:0]   ry,
  output logic [RESULT_W-1:0] alu_out
);

  logic [PC_W-1:0]    pc;
  logic [INSTR_W-1:0] instr;
  logic [REG_AW-1:0]  rdx, rdy;
  alu_op_e            op;

  risc_fetch #(.IM_INIT(IM_INIT)) u_fetch (
    .clk   (clk),
    .rst   (rst),
    .pc_in (pc_in),
    .pc    (pc),
    .instr (instr)
  );

  risc_decode u_decode (
    .clk    (clk),
    .rst    (rst),
    .instr  (instr),
    .rdx    (rdx),
    .rdy    (rdy),
    .alu_in (op)
  );

  risc_dmem #(.INIT(DM_INIT)) u_dmem (
    .clk (clk),
    .rst (rst),
    .rdx (rdx),
    .rdy (rdy),
    .rx  (rx),
    .ry  (ry)
  );

  risc_alu u_alu (
    .clk     (clk),
    .rst     (rst),
    .alu_in  (op),
    .rx      (rx),
    .ry      (ry),
    .alu_out (alu_out)
  );

  assign alu_in = op;

endmodule
