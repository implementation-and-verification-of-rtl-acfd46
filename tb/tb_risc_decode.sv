// tb_risc_decode: self-checking testbench for the decode unit.
//
// Applies every opcode with random operand fields, and a run of fully random
// instructions, and checks: Rdx = instr[7:4] and Rdy = instr[3:0] in the same
// cycle, except for opcode 0000 where both are 0; alu_in equals instr[15:12]
// one clock later; reset clears alu_in.
module tb_risc_decode;
  import risc_pkg::*;

  logic        clk = 1'b0;
  logic        rst;
  logic [15:0] instr;
  logic [3:0]  rdx, rdy;
  alu_op_e     alu_in;
  int checks = 0, failures = 0;
  int zero_op_seen = 0;

  risc_decode dut (.clk, .rst, .instr, .rdx, .rdy, .alu_in);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(logic [15:0] w);
    instr = w;
    #1;
    checks += 2;
    if (w[15:12] == 4'h0) begin
      zero_op_seen++;
      if (rdx != 4'h0 || rdy != 4'h0) begin
        failures++;
        $display("FAIL opcode 0 %h: rdx=%h rdy=%h, expected 0 0", w, rdx, rdy);
      end
    end else begin
      if (rdx != w[7:4]) begin failures++; $display("FAIL %h: rdx=%h", w, rdx); end
      if (rdy != w[3:0]) begin failures++; $display("FAIL %h: rdy=%h", w, rdy); end
    end
    @(posedge clk);
    #1;
    checks++;
    if (4'(alu_in) != w[15:12]) begin
      failures++;
      $display("FAIL %h: alu_in=%h one cycle later", w, alu_in);
    end
  endtask

  initial begin
    rst   = 1'b1;
    instr = 16'hFFFF;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (alu_in != OP_ADD) begin failures++; $display("FAIL reset: alu_in=%h", alu_in); end
    rst = 1'b0;
    for (int op = 0; op < 16; op++)
      for (int n = 0; n < 20; n++)
        step({4'(op), 12'($urandom)});
    for (int n = 0; n < 2000; n++) step(16'($urandom));
    checks++;
    if (zero_op_seen == 0) begin failures++; $display("FAIL opcode 0 never applied"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
