// tb_hash_processor: end-to-end testbench of the whole hash processor, with
// the clock scaled down (CLK_HZ = 16 x 38400 x 4) so that a bit lasts 64
// clocks at 38400 baud. A host model sends the 32 program words and one
// padded message block over the serial line, least significant byte of each
// word first. Three jobs run, with a reset between them:
//   1. SHA-1 of "abc" with the round loop followed by INPUT, AND and OUT;
//      the OUT bytes are decoded from txd;
//   2. SHA-256 of "abc" at 19200 baud with the plain round loop;
//   3. SHA-1 of "tugba" with the plain round loop.
// Expected working variables come from the reference model, and published
// first words are checked too: 42541B35 and 506E3058 after the last round of
// "abc", and A9993E36, BA7816BF and 1AF4BD0C after adding the initial value.
// The number of cycles from the first instruction fetch to HALT is compared
// with the count worked out from four cycles per instruction (five for STA).
// Each control state entered is counted, and a mechanism that never occurs
// is a failure.
`timescale 1ns/1ps
module tb_hash_processor;
  import hp_pkg::*;
  import sha_ref_pkg::*;

  localparam int unsigned CLK_HZ = 16 * 38400 * 4;

  logic clk = 0, rst = 1;
  logic [3:0] baud_sel;
  logic rxd, txd;
  word_t in_data, acc, alu_out;
  word_t chain [8];
  logic [4:0] pc;
  logic halted, alu_sign, rx_frame_err;
  int checks = 0, failures = 0;
  int bit_clks;
  int cycle = 0;
  int first_start = -1, halt_cycle = -1;
  int jmpp_taken = 0, jmpz_taken = 0, jmpp_not = 0, jmpz_not = 0;
  int count [string];
  string prev_state = "";
  logic [7:0] tx_bytes [$];

  hash_processor #(.CLK_HZ(CLK_HZ)) dut (
    .clk, .rst, .baud_sel, .rxd, .txd, .in_data, .chain, .acc, .pc, .halted,
    .alu_out, .alu_sign, .rx_frame_err);

  always #5 clk = ~clk;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
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

  // Count every control state entered; note jumps taken and not taken.
  always @(posedge clk) begin
    string s;
    cycle <= cycle + 1;
    s = dut.u_ctrl.state.name();
    if (!rst && s != prev_state) begin
      count[s] = count.exists(s) ? count[s] + 1 : 1;
      if (s == "S_START" && first_start < 0) first_start = cycle;
      if (s == "S_HALT") halt_cycle = cycle;
    end
    if (!rst && s == "S_JPOS") begin
      if (acc != 0 && !acc[31]) jmpp_taken++; else jmpp_not++;
    end
    if (!rst && s == "S_JZ") begin
      if (acc == 0) jmpz_taken++; else jmpz_not++;
    end
    prev_state = s;
    if (rx_frame_err && !rst) begin failures++; $display("FAIL framing error"); end
  end

  // Decode bytes sent by the processor.
  initial begin
    forever begin
      logic [7:0] b;
      @(negedge txd);
      if (rst) continue;
      repeat (bit_clks / 2) @(posedge clk);
      for (int i = 0; i < 8; i++) begin
        repeat (bit_clks) @(posedge clk);
        b[i] = txd;
      end
      repeat (bit_clks) @(posedge clk);
      tx_bytes.push_back(b);
    end
  end

  task automatic send_byte(logic [7:0] b);
    rxd = 0; repeat (bit_clks) @(posedge clk);
    for (int i = 0; i < 8; i++) begin rxd = b[i]; repeat (bit_clks) @(posedge clk); end
    rxd = 1; repeat (bit_clks + 5) @(posedge clk);
  endtask

  task automatic load(word_t prog [32], blk_t m);
    for (int i = 0; i < 32; i++) for (int j = 0; j < 4; j++) send_byte(prog[i][8*j +: 8]);
    for (int i = 0; i < 16; i++) for (int j = 0; j < 4; j++) send_byte(m[i][8*j +: 8]);
  endtask

  // The round loop: LDA 1E, RRGF, SHA, SRGF, LDA 1E, ADD 1D, STA 1E, LDA 1F,
  // SUB 1E, JMPZ 0B, JMPP 00, then HALT at 0B.
  function automatic void loop_program(bit sha2, output word_t p [32]);
    for (int i = 0; i < 32; i++) p[i] = '0;
    p[0]  = ins(4'b0000, 5'h1E);
    p[1]  = ins(sha2 ? 4'b1110 : 4'b1100, 5'h00);
    p[2]  = ins(sha2 ? 4'b1010 : 4'b0001, 5'h00);
    p[3]  = ins(sha2 ? 4'b1101 : 4'b1011, 5'h00);
    p[4]  = ins(4'b0000, 5'h1E);
    p[5]  = ins(4'b0010, 5'h1D);
    p[6]  = ins(4'b1000, 5'h1E);
    p[7]  = ins(4'b0000, 5'h1F);
    p[8]  = ins(4'b0011, 5'h1E);
    p[9]  = ins(4'b1111, 5'h0B);
    p[10] = ins(4'b0110, 5'h00);
    p[11] = ins(4'b0111, 5'h00);
    p[5'h1D] = 32'd1;
    p[5'h1E] = 32'd0;
    p[5'h1F] = sha2 ? 32'd64 : 32'd80;
  endfunction

  task automatic run_job(string name, bit sha2, word_t prog [32], blk_t m, int exp_cycles);
    vars_t e;
    rst = 1; first_start = -1; halt_cycle = -1;
    repeat (3) @(posedge clk);
    rst = 0;
    repeat (20) @(posedge clk);
    load(prog, m);
    while (!halted) @(posedge clk);
    #1;
    e = sha2 ? sha256_run(m, sha256_iv(), 64) : sha1_run(m, sha1_iv(), 80);
    for (int i = 0; i < (sha2 ? 8 : 5); i++) check($sformatf("%s var %0d", name, i), chain[i], e[i]);
    if (exp_cycles > 0) check({name, " cycles fetch to halt"}, halt_cycle - first_start, exp_cycles);
  endtask

  initial begin
    word_t p [32];
    blk_t m;
    rxd = 1; baud_sel = 4'b0110; in_data = 32'h1234ABCD;
    bit_clks = 64;

    // Job 1: SHA-1 "abc", then INPUT, AND with a mask, OUT.
    loop_program(0, p);
    p[11] = ins(4'b0100, 5'h00);   // INPUT
    p[12] = ins(4'b1001, 5'h1C);   // AND 1C
    p[13] = ins(4'b0101, 5'h00);   // OUT
    p[14] = ins(4'b0111, 5'h00);   // HALT
    p[5'h1C] = 32'h0000FFFF;
    m = pad1("abc");
    run_job("sha1 abc", 0, p, m, 0);
    check("sha1 abc A", chain[0], 32'h42541B35);
    check("sha1 abc H0", chain[0] + 32'h67452301, 32'hA9993E36);
    repeat (12 * bit_clks) @(posedge clk);
    check("bytes sent by OUT", tx_bytes.size(), 4);
    if (tx_bytes.size() == 4)
      check("OUT word", {tx_bytes[0], tx_bytes[1], tx_bytes[2], tx_bytes[3]}, 32'h0000ABCD);
    check("accumulator after AND", acc, 32'h0000ABCD);

    // Job 2: SHA-256 "abc" at 19200 baud.
    baud_sel = 4'b0101; bit_clks = 128;
    loop_program(1, p);
    run_job("sha256 abc", 1, p, m, 63 * 45 + 41 + 3);
    check("sha256 abc A", chain[0], 32'h506E3058);
    check("sha256 abc H0", chain[0] + 32'h6A09E667, 32'hBA7816BF);

    // Job 3: SHA-1 "tugba".
    baud_sel = 4'b0110; bit_clks = 64;
    loop_program(0, p);
    m = pad1("tugba");
    run_job("sha1 tugba", 0, p, m, 79 * 45 + 41 + 3);
    check("sha1 tugba A", chain[0], 32'hB3AF9A0B);
    check("sha1 tugba H0", chain[0] + 32'h67452301, 32'h1AF4BD0C);

    // Every mechanism must have happened.
    foreach (count[s]) $display("state %-10s entered %0d times", s, count[s]);
    $display("JMPP taken %0d not taken %0d, JMPZ taken %0d not taken %0d",
             jmpp_taken, jmpp_not, jmpz_taken, jmpz_not);
    begin
      string need [] = '{"S_FILL_1", "S_FILL_3", "S_MSG_2", "S_END", "S_LOAD", "S_ADD", "S_SUB",
                         "S_AND", "S_INPUT", "S_OUT", "S_JPOS", "S_JZ", "S_STORE", "S_STORE2",
                         "S_SHA1", "S_SHA2", "S_RRGF1", "S_RRGF2", "S_SRGF1", "S_SRGF2", "S_HALT"};
      foreach (need[i]) begin
        checks++;
        if (!count.exists(need[i])) begin failures++; $display("FAIL state %s never entered", need[i]); end
      end
    end
    check("SHA-1 rounds run", count.exists("S_SHA1") ? count["S_SHA1"] : 0, 160);
    check("SHA-256 rounds run", count.exists("S_SHA2") ? count["S_SHA2"] : 0, 64);
    checks++; if (jmpp_taken == 0) begin failures++; $display("FAIL JMPP never taken"); end
    checks++; if (jmpz_taken == 0) begin failures++; $display("FAIL JMPZ never taken"); end
    checks++; if (jmpz_not == 0)   begin failures++; $display("FAIL JMPZ never fell through"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
