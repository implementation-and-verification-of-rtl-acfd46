// risc_ref_pkg: reference model of the ALU operation table for the
// testbenches, written with 64-bit integer arithmetic rather than the
// 32-bit logic of the design. Operands are zero-extended 16-bit values; the
// result is the low 32 bits. Division by zero gives 0000FFFF (DIV) and Rx
// (MOD); shift distances of 32 or more give 0.
package risc_ref_pkg;

  function automatic logic [31:0] ref_alu(logic [3:0] op, logic [15:0] x, logic [15:0] y);
    longint unsigned a = longint'(x), b = longint'(y), r;
    longint unsigned m32 = 64'hFFFF_FFFF;
    case (op)
      4'd0:  r = a + b;
      4'd1:  r = (a - b) & m32;
      4'd2:  r = a * b;
      4'd3:  r = (b == 0) ? 64'h0000_FFFF : a / b;
      4'd4:  r = (b == 0) ? a : a % b;
      4'd5:  r = a + 1;
      4'd6:  r = (a - 1) & m32;
      4'd7:  r = a & b;
      4'd8:  r = a | b;
      4'd9:  r = m32 - a;
      4'd10: r = a ^ b;
      4'd11: r = m32 - (a ^ b);
      4'd12: r = m32 - (a & b);
      4'd13: r = m32 - (a | b);
      4'd14: r = (b >= 32) ? 0 : (a >> b);
      default: r = (b >= 32) ? 0 : ((a << b) & m32);
    endcase
    return r[31:0];
  endfunction

endpackage
