// tb_risc_alu: self-checking testbench for the execution unit.
//
// Drives the ALU with (1) the sixteen operand sets of the published
// simulation trace, comparing alu_out with the printed result values,
// (2) corner cases (zero divisor, shift distances of 0, 15, 31, 32 and more,
// wrap-around of SUB and DEC) and (3) random operands for every opcode,
// compared with the 64-bit integer reference model of risc_ref_pkg. Every
// result is checked exactly one clock after its operands were applied, which
// checks the one-cycle latency and one-operation-per-cycle throughput, and
// reset is checked to clear the output.
module tb_risc_alu;
  import risc_pkg::*;
  import risc_ref_pkg::*;

  logic        clk = 1'b0;
  logic        rst;
  alu_op_e     alu_in;
  logic [15:0] rx, ry;
  logic [31:0] alu_out;

  int checks = 0, failures = 0;

  risc_alu dut (.clk, .rst, .alu_in, .rx, .ry, .alu_out);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end


  // Apply one operation, then check the registered result one edge later.
  task automatic apply_and_check(logic [3:0] op, logic [15:0] x, logic [15:0] y,
                                 logic [31:0] expected);
    alu_in = alu_op_e'(op);
    rx = x;
    ry = y;
    @(posedge clk);
    #1;
    checks++;
    if (alu_out !== expected) begin
      failures++;
      $display("FAIL op=%h rx=%h ry=%h: alu_out=%h expected=%h", op, x, y, alu_out, expected);
    end
  endtask

  // Operand sets and results printed in the published simulation trace.
  logic [3:0]  fig_op [16];
  logic [15:0] fig_rx [16];
  logic [15:0] fig_ry [16];
  logic [31:0] fig_out[16];

  initial begin
    fig_rx  = '{16'h000F, 16'h000F, 16'h000F, 16'h000F, 16'h000F, 16'h0008, 16'h0008, 16'h0007,
                16'h0010, 16'h000F, 16'h000F, 16'h0005, 16'h0005, 16'h0005, 16'h0005, 16'h0005};
    fig_ry  = '{16'h000F, 16'h000F, 16'h0007, 16'h0005, 16'h0005, 16'h0008, 16'h0008, 16'h0080,
                16'h000F, 16'h0005, 16'h0000, 16'h0010, 16'h0005, 16'h0007, 16'h000F, 16'h0007};
    fig_out = '{32'h0000_001E, 32'h0000_0000, 32'h0000_0069, 32'h0000_0003,
                32'h0000_0000, 32'h0000_0009, 32'h0000_0007, 32'h0000_0000,
                32'h0000_001F, 32'hFFFF_FFF0, 32'h0000_000F, 32'hFFFF_FFEA,
                32'hFFFF_FFFA, 32'hFFFF_FFF8, 32'h0000_0000, 32'h0000_0280};
    for (int i = 0; i < 16; i++) fig_op[i] = 4'(i);

    alu_in = OP_ADD;
    rx = 16'h1234;
    ry = 16'h4321;
    rst = 1'b1;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (alu_out !== 32'h0) begin
      failures++;
      $display("FAIL reset: alu_out=%h", alu_out);
    end
    rst = 1'b0;

    // (1) published trace, back to back, one result per cycle
    for (int i = 0; i < 16; i++) apply_and_check(fig_op[i], fig_rx[i], fig_ry[i], fig_out[i]);

    // (2) corner cases
    apply_and_check(4'd3, 16'h1234, 16'h0000, 32'h0000_FFFF);
    apply_and_check(4'd4, 16'h1234, 16'h0000, 32'h0000_1234);
    apply_and_check(4'd1, 16'h0000, 16'h0001, 32'hFFFF_FFFF);
    apply_and_check(4'd6, 16'h0000, 16'h0000, 32'hFFFF_FFFF);
    apply_and_check(4'd5, 16'hFFFF, 16'h0000, 32'h0001_0000);
    apply_and_check(4'd0, 16'hFFFF, 16'hFFFF, 32'h0001_FFFE);
    apply_and_check(4'd2, 16'hFFFF, 16'hFFFF, 32'hFFFE_0001);
    apply_and_check(4'd15, 16'h8001, 16'd15, 32'h4000_8000);
    apply_and_check(4'd15, 16'h0001, 16'd31, 32'h8000_0000);
    apply_and_check(4'd15, 16'hFFFF, 16'd32, 32'h0000_0000);
    apply_and_check(4'd15, 16'hFFFF, 16'h0100, 32'h0000_0000);
    apply_and_check(4'd14, 16'h8000, 16'd15, 32'h0000_0001);
    apply_and_check(4'd14, 16'hABCD, 16'd0, 32'h0000_ABCD);
    apply_and_check(4'd14, 16'hFFFF, 16'd33, 32'h0000_0000);

    // (3) random operands, every opcode
    for (int n = 0; n < 4000; n++) begin
      logic [3:0]  op;
      logic [15:0] x, y;
      op = 4'($urandom_range(0, 15));
      x  = 16'($urandom);
      y  = ($urandom_range(0, 3) == 0) ? 16'($urandom_range(0, 40)) : 16'($urandom);
      apply_and_check(op, x, y, ref_alu(op, x, y));
    end

    // reset in the middle of operation clears the result
    rst = 1'b1;
    @(posedge clk);
    #1;
    checks++;
    if (alu_out !== 32'h0) begin
      failures++;
      $display("FAIL mid-run reset: alu_out=%h", alu_out);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
