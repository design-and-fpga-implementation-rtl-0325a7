// tb_register_file: self-checking testbench of the register file. It checks
// the reset values (SHA-1 and SHA-256 initial hash values, zero spares) and
// random writes through all eight write ports. Random reads through all eight
// read ports are compared with a shadow model, including hold with the read
// enable low and the rule that the higher-numbered write port wins.
`timescale 1ns/1ps
module tb_register_file;
  import hp_pkg::*;
  import sha_ref_pkg::*;

  logic clk = 0, rst = 1;
  logic we;
  logic [RF_PORTS-1:0] re;
  logic [RF_PORTS-1:0][RF_AW-1:0] wa, ra;
  word_t rf_in [RF_PORTS];
  word_t rf_out [RF_PORTS];
  word_t shadow [16];
  word_t last [RF_PORTS];
  int checks = 0, failures = 0;

  register_file dut (.clk, .rst, .we, .re, .wa, .ra, .rf_in, .rf_out);

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
    vars_t i1, i2;
    i1 = sha1_iv(); i2 = sha256_iv();
    we = 0; re = '0; wa = '0; ra = '0;
    for (int p = 0; p < 8; p++) rf_in[p] = '0;
    repeat (2) @(posedge clk); #1;
    rst = 0;
    for (int r = 0; r < 16; r++) shadow[r] = (r < 5) ? i1[r] : (r < 13) ? i2[r-5] : '0;
    for (int p = 0; p < 8; p++) last[p] = '0;
    for (int n = 0; n < 2000; n++) begin
      we = ($urandom % 3) == 0;
      re = 8'($urandom);
      for (int p = 0; p < 8; p++) begin
        wa[p] = 4'($urandom); ra[p] = 4'($urandom); rf_in[p] = $urandom;
      end
      if (n < 2) begin we = 0; re = '1; for (int p = 0; p < 8; p++) ra[p] = 4'(p + 8 * n); end
      @(posedge clk); #1;
      for (int p = 0; p < 8; p++) if (re[p]) last[p] = shadow[ra[p]];
      if (we) for (int p = 0; p < 8; p++) shadow[wa[p]] = rf_in[p];
      for (int p = 0; p < 8; p++) check($sformatf("cycle %0d port %0d", n, p), rf_out[p], last[p]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
