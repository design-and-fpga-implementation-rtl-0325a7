// tb_uart_rx: self-checking testbench of the UART receiver. Ticks come every
// 4 clocks, so one bit lasts 64 clocks. 200 random bytes are sent as 8N1
// frames with random idle gaps and each received byte is checked. A frame
// with a low stop bit must raise frame_err and deliver no byte, and a glitch
// shorter than half a bit must not start a frame.
`timescale 1ns/1ps
module tb_uart_rx;
  logic clk = 0, rst = 1;
  logic tick, rxd;
  logic [7:0] data;
  logic valid, frame_err;
  int checks = 0, failures = 0;
  int divc = 0;
  logic [7:0] got [$];
  int errs = 0;

  uart_rx dut (.clk, .rst, .tick, .rxd, .data, .valid, .frame_err);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    divc <= (divc == 3) ? 0 : divc + 1;
    if (valid && !rst) got.push_back(data);
    if (frame_err && !rst) errs++;
  end
  assign tick = (divc == 3);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got_v, int exp);
    checks++;
    if (got_v != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got_v, exp);
    end
  endtask

  task automatic send(logic [7:0] b, logic stop);
    rxd = 0; repeat (64) @(posedge clk);
    for (int i = 0; i < 8; i++) begin rxd = b[i]; repeat (64) @(posedge clk); end
    rxd = stop; repeat (64) @(posedge clk);
    rxd = 1;
  endtask

  initial begin
    logic [7:0] sent [200];
    rxd = 1;
    repeat (3) @(posedge clk);
    rst = 0;
    repeat (100) @(posedge clk);
    for (int i = 0; i < 200; i++) begin
      sent[i] = 8'($urandom);
      send(sent[i], 1);
      repeat ($urandom % 50) @(posedge clk);
    end
    repeat (100) @(posedge clk);
    check("bytes received", got.size(), 200);
    for (int i = 0; i < 200 && i < got.size(); i++) check($sformatf("byte %0d", i), got[i], sent[i]);
    send(8'h5A, 0);
    repeat (40) @(posedge clk);
    check("frame error flagged", errs, 1);
    check("no byte from bad frame", got.size(), 200);
    // a low stop bit lasting past the sampling point may start a new frame:
    // let the line settle n_prev the glitch test
    repeat (2000) @(posedge clk);
    begin
      int n_prev;
      n_prev = got.size() + errs;
      rxd = 0; repeat (10) @(posedge clk); rxd = 1;
      repeat (1000) @(posedge clk);
      check("glitch ignored", got.size() + errs, n_prev);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
