// tb_risc_fetch: self-checking testbench for the fetch unit.
//
// Loads a start address through pc_in during reset, then checks on every
// clock that the program counter has advanced by exactly one and that instr
// is the memory word at the counter's low four bits (a test image whose word
// at address k is k * 0x1111 ^ 0xA5C3). Runs past the end of the 16-word
// memory to check the wrap, and past 255 to check the 8-bit counter
// roll-over. Repeats from several start addresses, including non-zero ones.
module tb_risc_fetch;
  import risc_pkg::*;

  function automatic logic [15:0] word_at(int k);
    return 16'((k * 16'h1111) ^ 16'hA5C3);
  endfunction

  function automatic logic [15:0][15:0] make_image();
    logic [15:0][15:0] img;
    for (int k = 0; k < 16; k++) img[k] = word_at(k);
    return img;
  endfunction

  localparam logic [15:0][15:0] IMG = make_image();

  logic        clk = 1'b0;
  logic        rst;
  logic [7:0]  pc_in, pc;
  logic [15:0] instr;
  int checks = 0, failures = 0;
  int wraps = 0;

  risc_fetch #(.IM_INIT(IMG)) dut (.clk, .rst, .pc_in, .pc, .instr);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (pc=%h instr=%h)", what, pc, instr);
    end
  endtask

  initial begin
    logic [7:0] exp_pc;
    logic [7:0] starts [4] = '{8'h00, 8'h05, 8'h0F, 8'hF3};
    foreach (starts[s]) begin
      rst   = 1'b1;
      pc_in = starts[s];
      repeat (2) @(posedge clk);
      #1;
      check(pc == starts[s], "reset loads pc_in");
      check(instr == word_at(int'(starts[s][3:0])), "first word at pc_in");
      rst = 1'b0;
      exp_pc = starts[s];
      for (int n = 0; n < 300; n++) begin
        @(posedge clk);
        #1;
        if (exp_pc[3:0] == 4'hF) wraps++;
        exp_pc = exp_pc + 8'd1;
        check(pc == exp_pc, "pc advances by one per cycle");
        check(instr == word_at(int'(exp_pc[3:0])), "instr is IM[pc]");
      end
    end
    check(wraps > 0, "memory wrap exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
