// risc_decode: instruction decode unit.
//
// The top four bits of the instruction, instr[15:12], are the operation: they
// become the ALU opcode alu_in unchanged. For every opcode except 0000 the
// data memory addresses are Rdx = instr[7:4] and Rdy = instr[3:0]; for opcode
// 0000 both addresses are forced to 0. instr[11:8] is not used.
//
// Interface: clk, rst (synchronous, active high), instr in; rdx and rdy
// (combinational, to the data register's read ports) and alu_in (registered)
// out.
// Timing: rdx and rdy follow instr in the same cycle; the data register
// captures the operands at the next edge, and alu_in is registered on that
// same edge so that opcode and operands reach the ALU together. Reset clears
// alu_in to 0000.
//
// The field positions and the opcode-0000 rule follow the published design.
// Registering alu_in here, to line it up with Rx and Ry, is this design's
// choice, made to match the published timing in which alu_in, Rx and Ry
// change on the same edge.
module risc_decode
  import risc_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic [INSTR_W-1:0] instr,
  output logic [REG_AW-1:0] rdx,
  output logic [REG_AW-1:0] rdy,
  output alu_op_e           alu_in
);

  instr_t ir;
  assign ir = instr_t'(instr);

  always_comb begin
    if (ir.op == OP_ADD) begin
      rdx = '0;
      rdy = '0;
    end else begin
      rdx = ir.rdx;
      rdy = ir.rdy;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) alu_in <= OP_ADD;
    else     alu_in <= ir.op;
  end

endmodule
