// risc_alu: execution unit, a registered 16-operation arithmetic and logic
// unit.
//
// The two 16-bit operands Rx and Ry are zero-extended to 32 bits and the
// operation chosen by the 4-bit opcode alu_in is computed on the extended
// values, so the bitwise inverting operations (NOT, XNOR, NAND, NOR) set the
// upper 16 result bits, SUB and DEC wrap modulo 2^32, MUL gives the full
// 32-bit product and SHL keeps bits shifted past bit 15. Shifts use the whole
// 16-bit Ry as the distance; a distance of 32 or more gives 0. The result is
// stored in the 32-bit register alu_out.
//
//   0000 ADD  Rx + Ry     0100 MOD  Rx % Ry    1000 OR   Rx | Ry    1100 NAND ~(Rx & Ry)
//   0001 SUB  Rx - Ry     0101 INC  Rx + 1     1001 NOT  ~Rx        1101 NOR  ~(Rx | Ry)
//   0010 MUL  Rx * Ry     0110 DEC  Rx - 1     1010 XOR  Rx ^ Ry    1110 SHR  Rx >> Ry
//   0011 DIV  Rx / Ry     0111 AND  Rx & Ry    1011 XNOR Rx ~^ Ry   1111 SHL  Rx << Ry
//
// Division and modulus are unsigned. Division by zero, for which no result is
// published, gives 0000FFFF for DIV and Rx for MOD.
//
// Interface: clk, rst (synchronous, active high, clears alu_out), alu_in,
// rx, ry in; alu_out out.
// Timing: alu_out holds the result of the operands present at the previous
// clock edge (one cycle of latency, one operation per cycle).
//
// The opcode table, the 16-bit operands, the 32-bit result, the clock and
// reset inputs and the one-cycle latency follow the published design; the
// zero extension, the shift-distance rule and the divide-by-zero results are
// this design's choices (the first two match the published simulation
// values).
module risc_alu
  import risc_pkg::*;
(
  input  logic                clk,
  input  logic                rst,
  input  alu_op_e             alu_in,
  input  logic [DATA_W-1:0]   rx,
  input  logic [DATA_W-1:0]   ry,
  output logic [RESULT_W-1:0] alu_out
);

  logic [RESULT_W-1:0] a, b, result;
  logic                b_zero;
  logic                shift_big;

  assign a         = RESULT_W'(rx);
  assign b         = RESULT_W'(ry);
  assign b_zero    = (ry == '0);
  assign shift_big = (ry >= DATA_W'(RESULT_W));

  always_comb begin
    unique case (alu_in)
      OP_ADD:  result = a + b;
      OP_SUB:  result = a - b;
      OP_MUL:  result = a * b;
      OP_DIV:  result = b_zero ? RESULT_W'({DATA_W{1'b1}}) : RESULT_W'(rx / ry);
      OP_MOD:  result = b_zero ? a : RESULT_W'(rx % ry);
      OP_INC:  result = a + RESULT_W'(1);
      OP_DEC:  result = a - RESULT_W'(1);
      OP_AND:  result = a & b;
      OP_OR:   result = a | b;
      OP_NOT:  result = ~a;
      OP_XOR:  result = a ^ b;
      OP_XNOR: result = a ~^ b;
      OP_NAND: result = ~(a & b);
      OP_NOR:  result = ~(a | b);
      OP_SHR:  result = shift_big ? '0 : a >> ry[4:0];
      OP_SHL:  result = shift_big ? '0 : a << ry[4:0];
      default: result = '0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) alu_out <= '0;
    else     alu_out <= result;
  end

endmodule
