// tb_risc_top: end-to-end testbench of the processor at its default
// parameters (default program and data memory).
//
// Phase 1, reset: with rst high all four observed outputs must read zero.
// Phase 2, published trace: starting from pc_in = 00, the sixteen
//   instructions must present the opcode/operand sequence and the results of
//   the published simulation trace, each result one cycle after its
//   operands, with the first operands one edge and the first result two
//   edges after reset is released.
// Phase 3, long run: several start addresses (including ones that make the
//   8-bit program counter roll over) and a reset in the middle of a run,
//   checked every cycle against a cycle-level model kept here: its own copy
//   of the default program and data, the decode rule (opcode 0000 reads
//   a[0], a[0]) and the ALU reference of risc_ref_pkg.
// Every mechanism is counted: reset, each of the 16 ALU operations, the
// opcode-0000 address rule, the wrap of the 16-word program, the 8-bit
// counter roll-over and a non-zero start address; one that never happens
// counts as a failure.
module tb_risc_top;
  import risc_ref_pkg::*;

  logic        clk = 1'b0;
  logic        rst;
  logic [7:0]  pc_in;
  logic [3:0]  alu_in;
  logic [15:0] rx, ry;
  logic [31:0] alu_out;
  int checks = 0, failures = 0;

  risc_top dut (.clk, .rst, .pc_in, .alu_in, .rx, .ry, .alu_out);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Default program and data memory, as documented for the design.
  logic [15:0] prog [16] = '{16'h0034, 16'h1000, 16'h2001, 16'h3002, 16'h4002, 16'h5033,
                             16'h6033, 16'h7014, 16'h8050, 16'h9002, 16'hA006, 16'hB225,
                             16'hC222, 16'hD221, 16'hE220, 16'hF221};
  logic [15:0] data [16] = '{16'h000F, 16'h0007, 16'h0005, 16'h0008, 16'h0080, 16'h0010,
                             16'h0000, 16'h0000, 16'h0020, 16'h0001, 16'h0100, 16'h0003,
                             16'h00FF, 16'h1234, 16'h8000, 16'hFFFF};

  // Published trace: operands per opcode slot and the result of each slot.
  logic [15:0] fig_rx [16] = '{16'h000F, 16'h000F, 16'h000F, 16'h000F, 16'h000F, 16'h0008,
                               16'h0008, 16'h0007, 16'h0010, 16'h000F, 16'h000F, 16'h0005,
                               16'h0005, 16'h0005, 16'h0005, 16'h0005};
  logic [15:0] fig_ry [16] = '{16'h000F, 16'h000F, 16'h0007, 16'h0005, 16'h0005, 16'h0008,
                               16'h0008, 16'h0080, 16'h000F, 16'h0005, 16'h0000, 16'h0010,
                               16'h0005, 16'h0007, 16'h000F, 16'h0007};
  logic [31:0] fig_out[16] = '{32'h0000_001E, 32'h0000_0000, 32'h0000_0069, 32'h0000_0003,
                               32'h0000_0000, 32'h0000_0009, 32'h0000_0007, 32'h0000_0000,
                               32'h0000_001F, 32'hFFFF_FFF0, 32'h0000_000F, 32'hFFFF_FFEA,
                               32'hFFFF_FFFA, 32'hFFFF_FFF8, 32'h0000_0000, 32'h0000_0280};

  // Mechanism counters.
  int n_reset = 0, n_op0_rule = 0, n_im_wrap = 0, n_pc_roll = 0, n_nonzero_start = 0;
  int n_op [16];

  task automatic expect_eq(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h (t=%0t)", what, got, exp, $time);
    end
  endtask

  // Cycle-level model of the pipeline.
  logic [7:0]  m_pc;
  logic [3:0]  m_op;
  logic [15:0] m_rx, m_ry;
  logic [31:0] m_out;

  task automatic model_reset(logic [7:0] start);
    m_pc = start; m_op = '0; m_rx = '0; m_ry = '0; m_out = '0;
  endtask

  task automatic model_step();
    logic [3:0]  ax, ay;
    logic [15:0] ir;
    ir = prog[m_pc[3:0]];
    m_out = ref_alu(m_op, m_rx, m_ry);
    if (ir[15:12] == 4'h0 && ir[7:0] != 8'h00) n_op0_rule++;
    ax = (ir[15:12] == 4'h0) ? 4'h0 : ir[7:4];
    ay = (ir[15:12] == 4'h0) ? 4'h0 : ir[3:0];
    m_op = ir[15:12];
    m_rx = data[ax];
    m_ry = data[ay];
    if (m_pc[3:0] == 4'hF) n_im_wrap++;
    if (m_pc == 8'hFF) n_pc_roll++;
    m_pc = m_pc + 8'd1;
  endtask

  task automatic compare_model(string what);
    expect_eq(32'(alu_in), 32'(m_op), {what, " alu_in"});
    expect_eq(32'(rx), 32'(m_rx), {what, " rx"});
    expect_eq(32'(ry), 32'(m_ry), {what, " ry"});
    expect_eq(alu_out, m_out, {what, " alu_out"});
    n_op[m_op]++;
  endtask

  task automatic run_from(logic [7:0] start, int cycles);
    rst = 1'b1;
    pc_in = start;
    repeat (2) @(posedge clk);
    #1;
    model_reset(start);
    compare_model("reset");
    rst = 1'b0;
    if (start != 8'h00) n_nonzero_start++;
    for (int c = 0; c < cycles; c++) begin
      @(posedge clk);
      #1;
      model_step();
      compare_model("run");
    end
  endtask

  initial begin
    foreach (n_op[i]) n_op[i] = 0;

    // Phase 1: reset holds every output at zero.
    rst = 1'b1;
    pc_in = 8'h00;
    for (int c = 0; c < 4; c++) begin
      @(posedge clk);
      #1;
      expect_eq(32'(alu_in), 0, "reset alu_in");
      expect_eq(32'(rx), 0, "reset rx");
      expect_eq(32'(ry), 0, "reset ry");
      expect_eq(alu_out, 0, "reset alu_out");
    end
    n_reset++;

    // Phase 2: the published trace, from pc_in = 00.
    rst = 1'b0;
    for (int k = 0; k <= 16; k++) begin
      @(posedge clk);  // edge k+1: operands of instruction k, result of k-1
      #1;
      if (k < 16) begin
        expect_eq(32'(alu_in), 32'(k), "trace alu_in");
        expect_eq(32'(rx), 32'(fig_rx[k]), "trace rx");
        expect_eq(32'(ry), 32'(fig_ry[k]), "trace ry");
      end
      // the first slot still shows the reset value of alu_out
      if (k == 0) expect_eq(alu_out, 0, "trace first alu_out");
      else        expect_eq(alu_out, fig_out[k-1], "trace alu_out");
    end

    // Phase 3: model-checked runs.
    run_from(8'h00, 100);
    run_from(8'h07, 37);
    run_from(8'hF3, 300);   // rolls the 8-bit counter over
    // reset in the middle of a run
    rst = 1'b1;
    @(posedge clk);
    #1;
    expect_eq(alu_out, 0, "mid-run reset alu_out");
    expect_eq(32'(rx), 0, "mid-run reset rx");
    n_reset++;
    run_from(8'h0C, 50);

    // Every mechanism must have happened.
    checks++;
    if (n_reset == 0 || n_op0_rule == 0 || n_im_wrap == 0 || n_pc_roll == 0 ||
        n_nonzero_start == 0) begin
      failures++;
      $display("FAIL mechanism missing: reset=%0d op0=%0d wrap=%0d roll=%0d start=%0d",
               n_reset, n_op0_rule, n_im_wrap, n_pc_roll, n_nonzero_start);
    end
    foreach (n_op[i]) begin
      checks++;
      if (n_op[i] == 0) begin failures++; $display("FAIL opcode %0d never executed", i); end
    end
    $display("mechanisms: reset=%0d opcode0_rule=%0d program_wrap=%0d pc_rollover=%0d nonzero_start=%0d",
             n_reset, n_op0_rule, n_im_wrap, n_pc_roll, n_nonzero_start);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
