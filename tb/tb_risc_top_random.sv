// tb_risc_top_random: the whole processor running programs other than the
// default one.
//
// Three program/data image pairs are generated at elaboration time by a
// 32-bit xorshift generator with fixed seeds (state ^= state << 13;
// state ^= state >> 17; state ^= state << 5; each word is the low 16 bits of
// the next state). Data words are occasionally forced to 0 and to small
// values so that division by zero and short shifts occur. Each image pair is
// loaded into its own processor instance through the IM_INIT/DM_INIT
// parameters; each instance runs from several start addresses and is compared
// every clock with a cycle-level model: fetch at pc[3:0], the opcode-0000
// address rule, operand read, and the ALU reference of risc_ref_pkg, with
// the result one cycle behind its operands.
module tb_risc_top_random;
  import risc_ref_pkg::*;

  typedef logic [15:0][15:0] image_t;

  function automatic logic [31:0] xorshift(logic [31:0] s);
    s ^= s << 13;
    s ^= s >> 17;
    s ^= s << 5;
    return s;
  endfunction

  function automatic image_t make_prog(logic [31:0] seed);
    image_t img;
    logic [31:0] s = seed;
    for (int k = 0; k < 16; k++) begin
      s = xorshift(s);
      img[k] = s[15:0];
    end
    return img;
  endfunction

  function automatic image_t make_data(logic [31:0] seed);
    image_t img;
    logic [31:0] s = seed;
    for (int k = 0; k < 16; k++) begin
      s = xorshift(s);
      case (s[19:18])
        2'd0:    img[k] = 16'h0000;
        2'd1:    img[k] = {11'd0, s[4:0]};
        default: img[k] = s[15:0];
      endcase
    end
    return img;
  endfunction

  localparam image_t P0 = make_prog(32'h1234_5678), D0 = make_data(32'h9ABC_DEF1);
  localparam image_t P1 = make_prog(32'h0BAD_F00D), D1 = make_data(32'hFEED_BEEF);
  localparam image_t P2 = make_prog(32'h2468_ACE1), D2 = make_data(32'h1357_9BDF);

  logic        clk = 1'b0;
  logic        rst;
  logic [7:0]  pc_in;
  logic [3:0]  alu_in [3];
  logic [15:0] rx [3], ry [3];
  logic [31:0] alu_out [3];
  int checks = 0, failures = 0;
  int n_op [16];
  int n_op0_rule = 0;

  risc_top #(.IM_INIT(P0), .DM_INIT(D0)) dut0 (.clk, .rst, .pc_in, .alu_in(alu_in[0]),
    .rx(rx[0]), .ry(ry[0]), .alu_out(alu_out[0]));
  risc_top #(.IM_INIT(P1), .DM_INIT(D1)) dut1 (.clk, .rst, .pc_in, .alu_in(alu_in[1]),
    .rx(rx[1]), .ry(ry[1]), .alu_out(alu_out[1]));
  risc_top #(.IM_INIT(P2), .DM_INIT(D2)) dut2 (.clk, .rst, .pc_in, .alu_in(alu_in[2]),
    .rx(rx[2]), .ry(ry[2]), .alu_out(alu_out[2]));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  image_t progs [3];
  image_t datas [3];

  // model state per instance
  logic [7:0]  m_pc [3];
  logic [3:0]  m_op [3];
  logic [15:0] m_rx [3], m_ry [3];
  logic [31:0] m_out [3];

  task automatic expect_eq(logic [31:0] got, logic [31:0] exp, string what, int i);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL dut%0d %s: got %h expected %h (t=%0t)", i, what, got, exp, $time);
    end
  endtask

  task automatic compare(int i);
    expect_eq(32'(alu_in[i]), 32'(m_op[i]), "alu_in", i);
    expect_eq(32'(rx[i]), 32'(m_rx[i]), "rx", i);
    expect_eq(32'(ry[i]), 32'(m_ry[i]), "ry", i);
    expect_eq(alu_out[i], m_out[i], "alu_out", i);
  endtask

  task automatic step(int i);
    logic [15:0] ir;
    logic [3:0]  ax, ay;
    ir = progs[i][m_pc[i][3:0]];
    m_out[i] = ref_alu(m_op[i], m_rx[i], m_ry[i]);
    if (ir[15:12] == 4'h0 && ir[7:0] != 8'h00) n_op0_rule++;
    ax = (ir[15:12] == 4'h0) ? 4'h0 : ir[7:4];
    ay = (ir[15:12] == 4'h0) ? 4'h0 : ir[3:0];
    m_op[i] = ir[15:12];
    m_rx[i] = datas[i][ax];
    m_ry[i] = datas[i][ay];
    m_pc[i] = m_pc[i] + 8'd1;
    n_op[m_op[i]]++;
  endtask

  initial begin
    logic [7:0] starts [4] = '{8'h00, 8'h09, 8'h3E, 8'hFA};
    progs = '{P0, P1, P2};
    datas = '{D0, D1, D2};
    foreach (n_op[k]) n_op[k] = 0;
    foreach (starts[s]) begin
      rst = 1'b1;
      pc_in = starts[s];
      repeat (2) @(posedge clk);
      #1;
      for (int i = 0; i < 3; i++) begin
        m_pc[i] = starts[s]; m_op[i] = '0; m_rx[i] = '0; m_ry[i] = '0; m_out[i] = '0;
        compare(i);
      end
      rst = 1'b0;
      for (int c = 0; c < 200; c++) begin
        @(posedge clk);
        #1;
        for (int i = 0; i < 3; i++) begin
          step(i);
          compare(i);
        end
      end
    end
    // the generated programs must between them use most opcodes
    begin
      int used = 0;
      foreach (n_op[k]) if (n_op[k] > 0) used++;
      checks++;
      if (used < 12 || n_op0_rule == 0) begin
        failures++;
        $display("FAIL coverage: %0d opcodes used, opcode-0000 rule seen %0d times", used, n_op0_rule);
      end
      $display("opcodes used: %0d of 16, opcode-0000 rule applied %0d times", used, n_op0_rule);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
