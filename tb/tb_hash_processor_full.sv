// tb_hash_processor_full: the hash processor at its default parameters
// (100 MHz clock, 32-word program memory, 16-word message block) running
// two complete jobs at 38400 baud (2604 clocks per bit). A host model sends
// the round-loop program and the padded message "abc" each time.
//   1. SHA-1: the working variables must match the reference model, the
//      first must be 42541B35 (digest word A9993E36 after adding the initial
//      value), and the run must take 79 x 45 + 41 + 3 cycles from the first
//      fetch to HALT.
//   2. After a reset, SHA-256: first variable 506E3058 (digest word
//      BA7816BF), 63 x 45 + 41 + 3 cycles.
`timescale 1ns/1ps
module tb_hash_processor_full;
  import hp_pkg::*;
  import sha_ref_pkg::*;

  localparam int BIT_CLKS = 2604;   // 100 MHz / 38400 baud

  logic clk = 0, rst = 1;
  logic [3:0] baud_sel;
  logic rxd, txd;
  word_t in_data, acc, alu_out;
  word_t chain [8];
  logic [4:0] pc;
  logic halted, alu_sign, rx_frame_err;
  int checks = 0, failures = 0;
  int cycle = 0, first_start = -1, halt_cycle = -1;

  hash_processor dut (
    .clk, .rst, .baud_sel, .rxd, .txd, .in_data, .chain, .acc, .pc, .halted,
    .alu_out, .alu_sign, .rx_frame_err);

  always #5 clk = ~clk;

  initial begin
    repeat (14000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (first_start < 0 && dut.u_ctrl.state.name() == "S_START") first_start = cycle;
    if (halt_cycle < 0 && halted) halt_cycle = cycle;
  end

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %08h expected %08h", what, got, exp);
    end
  endtask

  task automatic send_byte(logic [7:0] b);
    rxd = 0; repeat (BIT_CLKS) @(posedge clk);
    for (int i = 0; i < 8; i++) begin rxd = b[i]; repeat (BIT_CLKS) @(posedge clk); end
    rxd = 1; repeat (BIT_CLKS + 20) @(posedge clk);
  endtask

  // Sends one job: the program memory image, then the message block, each
  // word least significant byte first.
  task automatic send_job(input word_t p [32], input blk_t m);
    for (int i = 0; i < 32; i++) for (int j = 0; j < 4; j++) send_byte(p[i][8*j +: 8]);
    for (int i = 0; i < 16; i++) for (int j = 0; j < 4; j++) send_byte(m[i][8*j +: 8]);
  endtask

  // Round loop of the processor: rounds = 80 for SHA-1, 64 for SHA-256.
  function automatic void loop_program(output word_t p [32], input bit sha2);
    for (int i = 0; i < 32; i++) p[i] = '0;
    p[0]  = ins(4'b0000, 5'h1E);                    // LDA 1E   (loop)
    p[1]  = ins(sha2 ? 4'b1110 : 4'b1100, 5'h00);   // RRGF2 / RRGF1
    p[2]  = ins(sha2 ? 4'b1010 : 4'b0001, 5'h00);   // SHA2 / SHA1
    p[3]  = ins(sha2 ? 4'b1101 : 4'b1011, 5'h00);   // SRGF2 / SRGF1
    p[4]  = ins(4'b0000, 5'h1E);                    // LDA 1E
    p[5]  = ins(4'b0010, 5'h1D);                    // ADD 1D
    p[6]  = ins(4'b1000, 5'h1E);                    // STA 1E
    p[7]  = ins(4'b0000, 5'h1F);                    // LDA 1F
    p[8]  = ins(4'b0011, 5'h1E);                    // SUB 1E
    p[9]  = ins(4'b1111, 5'h0B);                    // JMPZ halt
    p[10] = ins(4'b0110, 5'h00);                    // JMPP loop
    p[11] = ins(4'b0111, 5'h00);                    // HALT
    p[5'h1D] = 32'd1;
    p[5'h1E] = 32'd0;
    p[5'h1F] = sha2 ? 32'd64 : 32'd80;
  endfunction

  task automatic start_job();
    rst = 1;
    repeat (3) @(posedge clk);
    first_start = -1;
    halt_cycle  = -1;
    rst = 0;
    repeat (20) @(posedge clk);
  endtask

  initial begin
    word_t p [32];
    blk_t m;
    vars_t e;
    rxd = 1; baud_sel = 4'b0110; in_data = '0;
    m = pad1("abc");

    // job 1: SHA-1
    loop_program(p, 1'b0);
    start_job();
    send_job(p, m);
    while (!halted) @(posedge clk);
    #1;
    e = sha1_run(m, sha1_iv(), 80);
    for (int i = 0; i < 5; i++) check($sformatf("SHA-1 var %0d", i), chain[i], e[i]);
    check("SHA-1 A after 80 rounds", chain[0], 32'h42541B35);
    check("SHA-1 digest word 0", chain[0] + 32'h67452301, 32'hA9993E36);
    check("SHA-1 cycles fetch to halt", halt_cycle - first_start, 79 * 45 + 41 + 3);

    // job 2: SHA-256
    loop_program(p, 1'b1);
    start_job();
    send_job(p, m);
    while (!halted) @(posedge clk);
    #1;
    e = sha256_run(m, sha256_iv(), 64);
    for (int i = 0; i < 8; i++) check($sformatf("SHA-256 var %0d", i), chain[i], e[i]);
    check("SHA-256 A after 64 rounds", chain[0], 32'h506E3058);
    check("SHA-256 digest word 0", chain[0] + 32'h6A09E667, 32'hBA7816BF);
    check("SHA-256 cycles fetch to halt", halt_cycle - first_start, 63 * 45 + 41 + 3);

    check("no framing error", {31'd0, rx_frame_err}, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
