// tb_message_expansion: self-checking testbench of the message expansion
// block. It loads random 16-word blocks, then steps through all rounds of
// SHA-1 (80) and SHA-256 (64), storing each W_t. Every W_t is compared with
// the reference message schedule. The same block is used for both so the
// second schedule overwrites the first.
`timescale 1ns/1ps
module tb_message_expansion;
  import hp_pkg::*;
  import sha_ref_pkg::*;

  logic clk = 0;
  logic we, step;
  logic [6:0] round;
  alusel_e sel;
  word_t di, w;
  int checks = 0, failures = 0;

  message_expansion dut (.clk, .we, .step, .round, .sel, .di, .w);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
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
    blk_t m;
    we = 0; step = 0; round = '0; sel = SEL_SHA1; di = '0;
    for (int b = 0; b < 4; b++) begin
      if (b == 0) m = pad1("abc");
      else for (int i = 0; i < 16; i++) m[i] = $urandom;
      for (int i = 0; i < 16; i++) begin
        round = 7'(i); di = m[i]; we = 1;
        @(posedge clk); #1;
      end
      we = 0;
      for (int pass = 0; pass < 2; pass++) begin
        bit s2;
        s2 = (pass == 1) ^ b[0];
        sel = s2 ? SEL_SHA2 : SEL_SHA1;
        for (int t = 0; t < (s2 ? 64 : 80); t++) begin
          round = 7'(t); step = 1; #1;
          check($sformatf("block %0d %s W%0d", b, s2 ? "sha256" : "sha1", t), w,
                s2 ? sha256_w(m, t) : sha1_w(m, t));
          @(posedge clk); #1;
        end
        step = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
