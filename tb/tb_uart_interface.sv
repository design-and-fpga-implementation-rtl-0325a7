// tb_uart_interface: self-checking testbench of the UART interface with a
// small serial buffer (4 words) and a clock scaled so one bit at 38400 baud
// is 64 clocks. A host model sends 16 bytes. The buffer must report full with
// the first byte in bits [7:0], drop extra bytes while full, and empty on
// acknowledge. A byte sent through the transmitter is looped back to the
// receiver and must arrive in the next buffer fill.
`timescale 1ns/1ps
module tb_uart_interface;
  localparam int unsigned CLK_HZ = 16 * 38400 * 4;
  localparam int unsigned FILL_BITS = 4 * 32;

  logic clk = 0, rst = 1;
  logic [3:0] baud_sel;
  logic rxd_host, rxd, txd;
  logic buf_full, buf_ack, tx_start, tx_busy, rx_frame_err;
  logic [FILL_BITS-1:0] buf_data;
  logic [7:0] tx_data;
  logic loopback;
  int checks = 0, failures = 0;

  uart_interface #(.CLK_HZ(CLK_HZ), .FILL_BITS(FILL_BITS)) dut (
    .clk, .rst, .baud_sel, .rxd, .txd, .buf_full, .buf_data, .buf_ack,
    .tx_start, .tx_data, .tx_busy, .rx_frame_err);

  assign rxd = loopback ? txd : rxd_host;

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  task automatic send(logic [7:0] b);
    rxd_host = 0; repeat (64) @(posedge clk);
    for (int i = 0; i < 8; i++) begin rxd_host = b[i]; repeat (64) @(posedge clk); end
    rxd_host = 1; repeat (70) @(posedge clk);
  endtask

  initial begin
    logic [127:0] exp;
    baud_sel = 4'b0110; rxd_host = 1; loopback = 0; buf_ack = 0; tx_start = 0; tx_data = '0;
    repeat (3) @(posedge clk); #1;
    rst = 0;
    repeat (50) @(posedge clk); #1;
    for (int i = 0; i < 16; i++) begin
      exp[8*i +: 8] = 8'($urandom);
      check("not full before the last byte", buf_full, 0);
      send(exp[8*i +: 8]);
    end
    #1;
    check("full", buf_full, 1);
    check("buffer contents", buf_data, exp);
    send(8'hEE);
    #1;
    check("extra byte dropped", buf_data, exp);
    @(negedge clk); buf_ack = 1; @(negedge clk); buf_ack = 0;
    check("empty after ack", buf_full, 0);
    // loop back the transmitter 16 times
    loopback = 1;
    for (int i = 0; i < 16; i++) begin
      @(negedge clk);
      tx_data = 8'(8'h30 + i); tx_start = 1;
      @(negedge clk);
      tx_start = 0;
      check("tx busy", tx_busy, 1);
      while (tx_busy) @(negedge clk);
      repeat (80) @(negedge clk);
    end
    for (int i = 0; i < 16; i++) exp[8*i +: 8] = 8'(8'h30 + i);
    check("looped back full", buf_full, 1);
    check("looped back contents", buf_data, exp);
    check("no framing errors", rx_frame_err, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
