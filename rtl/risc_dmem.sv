// risc_dmem: data register (data memory 'a') with the operand registers
// Rx and Ry.
//
// Sixteen 16-bit words are read through two independent read ports at the
// addresses Rdx and Rdy from the decoder; on each clock edge the two words
// are stored in the 16-bit registers Rx and Ry, which feed the ALU. The
// memory holds the user data given by the INIT parameter; the processor has
// no store instruction and no write-back path, so the contents are constant.
//
// Interface: clk, rst (synchronous, active high, clears Rx and Ry), rdx, rdy
// in; rx, ry out.
// Timing: one cycle from address to Rx/Ry.
//
// The size (16 x 16 bits), the two read addresses and the Rx/Ry registers
// follow the published design; the default contents
// (risc_pkg::DM_DEFAULT) and the reset clearing Rx and Ry are this design's
// choices.
module risc_dmem
  import risc_pkg::*;
#(
  parameter int unsigned DEPTH = DM_DEPTH,
  parameter int unsigned WIDTH = DATA_W,
  parameter logic [DEPTH-1:0][WIDTH-1:0] INIT = DM_DEFAULT
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic [$clog2(DEPTH)-1:0] rdx,
  input  logic [$clog2(DEPTH)-1:0] rdy,
  output logic [WIDTH-1:0]         rx,
  output logic [WIDTH-1:0]         ry
);

  always_ff @(posedge clk) begin
    if (rst) begin
      rx <= '0;
      ry <= '0;
    end else begin
      rx <= INIT[rdx];
      ry <= INIT[rdy];
    end
  end

endmodule
