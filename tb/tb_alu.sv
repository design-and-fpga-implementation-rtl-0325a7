// tb_alu: self-checking testbench of the ALU. Random chaining variables, W, K
// and round numbers are applied for SHA-1 and SHA-256 rounds. The eight
// registered outputs are compared with one round of the reference
// compression. Add, subtract, AND and OR results and the sign flag are then
// checked, and so is holding with the enable low.
`timescale 1ns/1ps
module tb_alu;
  import hp_pkg::*;
  import sha_ref_pkg::*;

  logic clk = 0, rst = 1;
  logic alu_e;
  logic [6:0] round;
  alusel_e sel;
  word_t acc_in, mem_data, k, w, alu_out;
  word_t v_in [8];
  word_t v_out [8];
  logic alu_sign;
  int checks = 0, failures = 0;

  alu dut (.clk, .rst, .alu_e, .round, .sel, .acc_in, .mem_data, .v_in, .k, .w,
           .alu_sign, .alu_out, .v_out);

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

  // One reference round: a single-word block holding W at position t would
  // not do, so the round is computed directly from the reference functions.
  function automatic vars_t ref_round(bit sha2, vars_t v, int t, w32_t kk, w32_t ww);
    vars_t r;
    w32_t f, t1, t2;
    r = v;
    if (!sha2) begin
      if (t < 20)      f = (v[1] & v[2]) | (~v[1] & v[3]);
      else if (t < 40) f = v[1] ^ v[2] ^ v[3];
      else if (t < 60) f = (v[1] & v[2]) | (v[1] & v[3]) | (v[2] & v[3]);
      else             f = v[1] ^ v[2] ^ v[3];
      r[0] = rl(v[0], 5) + f + v[4] + kk + ww;
      r[1] = v[0]; r[2] = rl(v[1], 30); r[3] = v[2]; r[4] = v[3];
    end else begin
      t1 = v[7] + (rr(v[4], 6) ^ rr(v[4], 11) ^ rr(v[4], 25)) + ((v[4] & v[5]) ^ (~v[4] & v[6])) + kk + ww;
      t2 = (rr(v[0], 2) ^ rr(v[0], 13) ^ rr(v[0], 22)) + ((v[0] & v[1]) ^ (v[0] & v[2]) ^ (v[1] & v[2]));
      r[0] = t1 + t2; r[1] = v[0]; r[2] = v[1]; r[3] = v[2]; r[4] = v[3] + t1;
      r[5] = v[4]; r[6] = v[5]; r[7] = v[6];
    end
    return r;
  endfunction

  initial begin
    vars_t v, e;
    int t;
    alu_e = 0; sel = SEL_SHA1; round = '0; acc_in = '0; mem_data = '0; k = '0; w = '0;
    for (int i = 0; i < 8; i++) v_in[i] = '0;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int n = 0; n < 400; n++) begin
      bit s2;
      s2 = n[0];
      t = s2 ? (n / 2) % 64 : (n / 2) % 80;
      for (int i = 0; i < 8; i++) begin v[i] = $urandom; v_in[i] = v[i]; end
      k = $urandom; w = $urandom;
      round = 7'(t);
      sel = s2 ? SEL_SHA2 : SEL_SHA1;
      alu_e = 1;
      @(posedge clk); #1;
      alu_e = 0;
      e = ref_round(s2, v, t, k, w);
      for (int i = 0; i < 8; i++) check($sformatf("%s round %0d var %0d", s2 ? "sha256" : "sha1", t, i), v_out[i], e[i]);
    end
    // hold when disabled
    for (int i = 0; i < 8; i++) begin e[i] = v_out[i]; v_in[i] = $urandom; end
    sel = SEL_SHA1; alu_e = 0;
    @(posedge clk); #1;
    for (int i = 0; i < 8; i++) check("hold", v_out[i], e[i]);
    // arithmetic and logic operations
    for (int n = 0; n < 200; n++) begin
      w32_t exp;
      acc_in = (n % 10 == 0) ? 32'd5 : $urandom; mem_data = (n % 10 == 0) ? 32'd5 : $urandom;
      case (n % 4)
        0: begin sel = SEL_ADD; exp = acc_in + mem_data; end
        1: begin sel = SEL_SUB; exp = acc_in - mem_data; end
        2: begin sel = SEL_AND; exp = acc_in & mem_data; end
        default: begin sel = SEL_OR; exp = acc_in | mem_data; end
      endcase
      alu_e = 1;
      @(posedge clk); #1;
      alu_e = 0;
      check($sformatf("op %0d", n % 4), alu_out, exp);
      check("sign", {31'd0, alu_sign}, {31'd0, (exp != 0) && !exp[31]});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
