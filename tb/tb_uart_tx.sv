// tb_uart_tx: self-checking testbench of the UART transmitter. Ticks come
// every 4 clocks (64 clocks per bit). Random bytes are started back to back.
// The line is sampled in the middle of every bit and checked for start bit,
// data least significant bit first and stop bit. Busy must rise the cycle
// after start, a frame must last 10 bits, and the line must idle high.
`timescale 1ns/1ps
module tb_uart_tx;
  logic clk = 0, rst = 1;
  logic tick, start, busy, txd;
  logic [7:0] data;
  int checks = 0, failures = 0;
  int divc = 0;

  uart_tx dut (.clk, .rst, .tick, .start, .data, .busy, .txd);

  always #5 clk = ~clk;
  always @(posedge clk) divc <= (divc == 3) ? 0 : divc + 1;
  assign tick = (divc == 3);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin
    logic [7:0] b, rx;
    int len;
    start = 0; data = '0;
    repeat (3) @(posedge clk); #1;
    rst = 0;
    check("idle high", txd, 1);
    check("idle not busy", busy, 0);
    for (int n = 0; n < 100; n++) begin
      b = 8'($urandom);
      data = b; start = 1;
      @(posedge clk); #1;
      start = 0; data = ~b;
      check("busy after start", busy, 1);
      // find the start bit edge
      len = 0;
      while (txd && len < 200) begin @(posedge clk); #1; len++; end
      repeat (32) @(posedge clk); #1;
      check("start bit", txd, 0);
      for (int i = 0; i < 8; i++) begin
        repeat (64) @(posedge clk); #1;
        rx[i] = txd;
      end
      repeat (64) @(posedge clk); #1;
      check("stop bit", txd, 1);
      check($sformatf("byte %0d", n), rx, b);
      len = 0;
      while (busy && len < 200) begin @(posedge clk); #1; len++; end
      check("frame ends within the stop bit", int'(len <= 40), 1);
    end
    repeat (100) @(posedge clk); #1;
    check("idle after frames", txd, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
