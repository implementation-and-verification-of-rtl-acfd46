// tb_risc_dmem: self-checking testbench for the data register.
//
// Uses a test image whose word at address k is {k, ~k, k+3, 7-k} (nibbles,
// mod 16) and one instance with the default contents. Reads random address
// pairs, including Rdx = Rdy, and checks that Rx and Ry hold the addressed
// words one clock later and that reset clears both.
module tb_risc_dmem;
  import risc_pkg::*;

  function automatic logic [15:0] word_at(int k);
    return {4'(k), ~4'(k), 4'(k + 3), 4'(7 - k)};
  endfunction

  function automatic logic [15:0][15:0] make_image();
    logic [15:0][15:0] img;
    for (int k = 0; k < 16; k++) img[k] = word_at(k);
    return img;
  endfunction

  localparam logic [15:0][15:0] IMG = make_image();

  logic        clk = 1'b0;
  logic        rst;
  logic [3:0]  rdx, rdy;
  logic [15:0] rx, ry, rx_d, ry_d;
  int checks = 0, failures = 0;

  risc_dmem #(.INIT(IMG)) dut (.clk, .rst, .rdx, .rdy, .rx, .ry);
  risc_dmem dut_def (.clk, .rst, .rdx, .rdy, .rx(rx_d), .ry(ry_d));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // default contents of addresses 0..6, the ones the default program reads
  logic [15:0] def_words [7] = '{16'h000F, 16'h0007, 16'h0005, 16'h0008,
                                 16'h0080, 16'h0010, 16'h0000};

  initial begin
    rst = 1'b1;
    rdx = 4'h3;
    rdy = 4'h9;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (rx != 16'h0 || ry != 16'h0) begin failures++; $display("FAIL reset"); end
    rst = 1'b0;
    for (int n = 0; n < 1000; n++) begin
      rdx = 4'($urandom);
      rdy = (n % 7 == 0) ? rdx : 4'($urandom);
      @(posedge clk);
      #1;
      checks += 2;
      if (rx != word_at(int'(rdx))) begin failures++; $display("FAIL rx a[%0d]=%h", rdx, rx); end
      if (ry != word_at(int'(rdy))) begin failures++; $display("FAIL ry a[%0d]=%h", rdy, ry); end
      if (rdx < 7) begin
        checks++;
        if (rx_d != def_words[rdx]) begin failures++; $display("FAIL default a[%0d]=%h", rdx, rx_d); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
