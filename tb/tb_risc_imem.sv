// tb_risc_imem: self-checking testbench for the instruction memory.
//
// Instantiates the ROM twice: once with the default program, whose sixteen
// words are listed here independently (each word's top nibble is its own
// address, so address k holds an instruction with opcode k), and once with a
// test image built from a formula, so that every address line and data bit is
// exercised. Every address is read and compared.
module tb_risc_imem;
  import risc_pkg::*;

  localparam logic [15:0][15:0] TEST_IMAGE = {
    16'hF0E1, 16'hE1D2, 16'hD2C3, 16'hC3B4, 16'hB4A5, 16'hA596, 16'h9687, 16'h8778,
    16'h7869, 16'h695A, 16'h5A4B, 16'h4B3C, 16'h3C2D, 16'h2D1E, 16'h1E0F, 16'h0FF0
  };

  logic [3:0]  addr;
  logic [15:0] instr_def, instr_test;
  int checks = 0, failures = 0;

  risc_imem dut_def (.addr(addr), .instr(instr_def));
  risc_imem #(.INIT(TEST_IMAGE)) dut_test (.addr(addr), .instr(instr_test));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] expected_default [16];

  initial begin
    expected_default = '{16'h0034, 16'h1000, 16'h2001, 16'h3002, 16'h4002, 16'h5033,
                         16'h6033, 16'h7014, 16'h8050, 16'h9002, 16'hA006, 16'hB225,
                         16'hC222, 16'hD221, 16'hE220, 16'hF221};
    for (int k = 0; k < 16; k++) begin
      logic [15:0] t;
      addr = 4'(k);
      #1;
      // test image formula: nibbles {k, 15-k, k-1, 16-k}, each mod 16
      t = {4'(k), 4'(15 - k), 4'(k - 1), 4'(16 - k)};
      checks += 2;
      if (instr_def !== expected_default[k]) begin
        failures++;
        $display("FAIL default addr %0d: %h expected %h", k, instr_def, expected_default[k]);
      end
      if (instr_test !== t) begin
        failures++;
        $display("FAIL test image addr %0d: %h expected %h", k, instr_test, t);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
