// tb_constants_rom: self-checking testbench of the constants ROM. For all 80
// addresses and both halves it compares the registered output K with the
// constants derived from their definitions: SHA-1 from square roots of 2, 3,
// 5 and 10; SHA-256 from cube roots of the first 64 primes, and zero beyond
// round 63. It also checks the one-cycle read latency and the reset value.
`timescale 1ns/1ps
module tb_constants_rom;
  import hp_pkg::*;
  import sha_ref_pkg::*;

  logic clk = 0, rst = 1;
  alusel_e sel;
  logic [6:0] address;
  word_t k;
  int checks = 0, failures = 0;

  constants_rom dut (.clk, .rst, .sel, .address, .k);

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
    sel = SEL_SHA1; address = 7'd5;
    @(posedge clk); #1;
    check("reset", k, '0);
    rst = 0;
    for (int t = 0; t < 80; t++) begin
      word_t k_prev;
      k_prev = k;
      address = 7'(t); sel = SEL_SHA1;
      #1 check($sformatf("no change before the clock, %0d", t), k, k_prev);
      @(posedge clk); #1;
      check($sformatf("sha1 K %0d", t), k, k1(t));
      sel = SEL_SHA2;
      @(posedge clk); #1;
      check($sformatf("sha256 K %0d", t), k, (t < 64) ? k2(t) : 32'h0);
    end
    // spot values printed with the SHA standards
    address = 7'd0;  sel = SEL_SHA2; @(posedge clk); #1; check("K256[0]", k, 32'h428a2f98);
    address = 7'd63; sel = SEL_SHA2; @(posedge clk); #1; check("K256[63]", k, 32'hc67178f2);
    address = 7'd79; sel = SEL_SHA1; @(posedge clk); #1; check("K1[79]", k, 32'hCA62C1D6);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
