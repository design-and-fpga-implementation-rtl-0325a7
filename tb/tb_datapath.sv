// tb_datapath: self-checking testbench of the datapath. It plays the control
// unit directly. It loads a padded message block into the message RAM and
// runs full SHA-1 (80 rounds) and SHA-256 (64 rounds) computations, each round
// as the three steps read-register-file / ALU round / write-register-file.
// The ALU result registers are compared with the reference compression
// after every round. Known published values are checked at the end: the
// first working variable after the last round is 42541B35 (SHA-1 "abc") and
// 506E3058 (SHA-256 "abc"). An ADD through the ALU is checked as well.
`timescale 1ns/1ps
module tb_datapath;
  import hp_pkg::*;
  import sha_ref_pkg::*;

  logic clk = 0, rst = 1;
  dp_ctrl_t ctrl;
  word_t acc, mem_data, alu_out;
  word_t chain [8];
  logic alu_sign;
  int checks = 0, failures = 0;

  datapath dut (.clk, .rst, .ctrl, .acc, .mem_data, .chain, .alu_out, .alu_sign);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
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

  task automatic load_block(blk_t m);
    for (int i = 0; i < 16; i++) begin
      ctrl = '0; ctrl.m_we = 1; ctrl.round = 7'(i); acc = m[i];
      @(posedge clk); #1;
    end
    ctrl = '0;
  endtask

  task automatic run(bit sha2, blk_t m);
    vars_t e;
    int nv, base, rounds;
    nv = sha2 ? 8 : 5; base = sha2 ? 5 : 0; rounds = sha2 ? 64 : 80;
    for (int t = 0; t < rounds; t++) begin
      ctrl = '0; ctrl.round = 7'(t); ctrl.alu_sel = sha2 ? SEL_SHA2 : SEL_SHA1;
      for (int p = 0; p < nv; p++) begin ctrl.rf_re[p] = 1; ctrl.rf_ra[p] = 4'(base + p); end
      @(posedge clk); #1;
      ctrl.rf_re = '0; ctrl.alu_e = 1;
      @(posedge clk); #1;
      ctrl.alu_e = 0; ctrl.rf_we = 1;
      for (int p = 0; p < 8; p++) ctrl.rf_wa[p] = (p < nv) ? 4'(base + p) : 4'(13 + p - 5);
      @(posedge clk); #1;
      ctrl = '0;
      e = sha2 ? sha256_run(m, sha256_iv(), t + 1) : sha1_run(m, sha1_iv(), t + 1);
      for (int i = 0; i < nv; i++)
        check($sformatf("%s round %0d var %0d", sha2 ? "sha256" : "sha1", t, i), chain[i], e[i]);
    end
  endtask

  initial begin
    blk_t m;
    ctrl = '0; acc = '0; mem_data = '0;
    repeat (2) @(posedge clk); #1;
    rst = 0;
    m = pad1("abc");
    load_block(m);
    run(0, m);
    check("SHA-1 abc A after 80 rounds", chain[0], 32'h42541B35);
    check("SHA-1 abc digest word 0", chain[0] + 32'h67452301, 32'hA9993E36);
    run(1, m);
    check("SHA-256 abc A after 64 rounds", chain[0], 32'h506E3058);
    check("SHA-256 abc digest word 0", chain[0] + 32'h6A09E667, 32'hBA7816BF);
    // ADD through the ALU
    ctrl = '0; ctrl.alu_sel = SEL_ADD; ctrl.alu_e = 1; acc = 32'd79; mem_data = 32'd1;
    @(posedge clk); #1;
    ctrl = '0;
    check("alu add", alu_out, 32'd80);
    check("alu sign", {31'd0, alu_sign}, 32'd1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
