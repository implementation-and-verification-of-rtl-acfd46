// risc_imem: instruction memory, a 16-word x 16-bit read-only memory.
//
// The program counter's low address bits select one word, which appears on
// instr combinationally (an asynchronous ROM read, as LUT-based ROM on an
// FPGA). The contents come from the INIT parameter and cannot be changed at
// run time.
//
// Interface: addr (log2(DEPTH) bits) in, instr (WIDTH bits) out.
// Timing: purely combinational; the fetch unit registers the word.
//
// The depth, width and read-only nature follow the published design; the
// asynchronous read and the default contents (risc_pkg::IM_DEFAULT) are this
// design's choice.
module risc_imem
  import risc_pkg::*;
#(
  parameter int unsigned DEPTH = IM_DEPTH,
  parameter int unsigned WIDTH = INSTR_W,
  parameter logic [DEPTH-1:0][WIDTH-1:0] INIT = IM_DEFAULT
) (
  input  logic [$clog2(DEPTH)-1:0] addr,
  output logic [WIDTH-1:0]         instr
);

  always_comb instr = INIT[addr];

endmodule
