// risc_fetch: instruction fetch unit, a program counter plus the
// instruction memory.
//
// While rst is high the program counter loads the start address pc_in. After
// reset, every clock edge advances it by one, so one instruction is issued
// per cycle. The counter's low bits address the 16-word memory, whose word
// goes straight to the decoder; the program therefore repeats every 16
// cycles, and the 8-bit counter itself rolls over after 255.
//
// Interface: clk, rst (synchronous, active high), pc_in (start address),
// pc (current program counter), instr (word at pc, to the decoder).
// Timing: instr follows pc combinationally; the decoder and data register
// capture it at the next edge.
//
// The program counter as the instruction memory's address, the 8-bit pc_in
// and the 16 x 16-bit memory follow the published design. Loading pc_in
// during reset, the free-running increment and the wrap at the end of memory
// are this design's choices.
module risc_fetch
  import risc_pkg::*;
#(
  parameter int unsigned PCW   = PC_W,
  parameter int unsigned DEPTH = IM_DEPTH,
  parameter int unsigned WIDTH = INSTR_W,
  parameter logic [DEPTH-1:0][WIDTH-1:0] IM_INIT = IM_DEFAULT
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [PCW-1:0]   pc_in,
  output logic [PCW-1:0]   pc,
  output logic [WIDTH-1:0] instr
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] im_word;

  risc_imem #(.DEPTH(DEPTH), .WIDTH(WIDTH), .INIT(IM_INIT)) u_imem (
    .addr  (pc[AW-1:0]),
    .instr (im_word)
  );

  always_ff @(posedge clk) begin
    if (rst) pc <= pc_in;
    else     pc <= pc + PCW'(1);
  end

  assign instr = im_word;

endmodule
