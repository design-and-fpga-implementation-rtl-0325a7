// tb_uart_baud_gen: self-checking testbench of the baud tick generator. With
// the clock scaled to 16 x 38400 x 4 Hz the expected tick periods are 4, 8,
// 16, 32, 64 and 128 clocks for the six rate codes 0110 down to 0001. Each
// period is measured over several ticks. A code outside the table must give
// no ticks.
`timescale 1ns/1ps
module tb_uart_baud_gen;
  localparam int unsigned CLK_HZ = 16 * 38400 * 4;

  logic clk = 0, rst = 1;
  logic [3:0] sel;
  logic tick;
  int checks = 0, failures = 0;

  uart_baud_gen #(.CLK_HZ(CLK_HZ)) dut (.clk, .rst, .sel, .tick);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    int last, n;
    sel = 4'b0110;
    repeat (2) @(posedge clk); #1;
    rst = 0;
    for (int code = 6; code >= 1; code--) begin
      sel = 4'(code);
      // let the generator settle on the new rate
      repeat (300) @(posedge clk);
      #1;
      n = 0;
      while (n < 200 && !tick) begin @(posedge clk); #1; n++; end
      last = 0;
      for (int k = 0; k < 5; k++) begin
        n = 0;
        @(posedge clk); #1; n++;
        while (!tick && n < 1000) begin @(posedge clk); #1; n++; end
        check($sformatf("period for code %0d", code), n, 4 << (6 - code));
      end
    end
    sel = 4'b1111;
    n = 0;
    repeat (2) @(posedge clk);
    repeat (300) begin @(posedge clk); #1; if (tick) n++; end
    check("no ticks for an unlisted code", n, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
