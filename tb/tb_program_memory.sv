// tb_program_memory: self-checking testbench of the 32 x 32 program memory.
// It writes every address with random data, then reads all addresses
// asynchronously (same cycle, no clock edge) and checks that a write only
// happens with 'we' high.
`timescale 1ns/1ps
module tb_program_memory;
  logic clk = 0, we;
  logic [4:0] a;
  logic [31:0] di, dout;
  logic [31:0] model [32];
  int checks = 0, failures = 0;

  program_memory dut (.clk, .we, .a, .di, .dout);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %08h expected %08h", what, got, exp);
    end
  endtask

  initial begin
    we = 0; a = '0; di = '0;
    @(posedge clk); #1;
    for (int i = 0; i < 32; i++) begin
      a = 5'(i); di = $urandom; we = 1; model[i] = di;
      @(posedge clk); #1;
    end
    we = 0;
    for (int i = 0; i < 32; i++) begin
      a = 5'(i); #1;
      check($sformatf("read %0d", i), dout, model[i]);
    end
    for (int n = 0; n < 500; n++) begin
      a = 5'($urandom); di = $urandom; we = $urandom % 2;
      @(posedge clk); #1;
      if (we) model[a] = di;
      we = 0;
      a = 5'($urandom); #1;
      check("random read", dout, model[a]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
