// tb_control_unit: self-checking testbench of the control unit. A behavioural
// program memory (asynchronous read, write on the clock edge) is attached and
// a full serial buffer is presented. Each check compares against values
// worked out by hand for the test program below.
//  - fill: all 32 program words land at their addresses and the 16 message
//    words are written to message addresses 0..15 in order;
//  - instructions: LDA, ADD, SUB, AND, STA, JMPP (taken and not taken),
//    JMPZ (taken), INPUT, OUT (four bytes, most significant first), HALT;
//  - datapath control of RRGF1/SHA1/SRGF1/RRGF2/SHA2/SRGF2: enables,
//    register numbers and select codes;
//  - timing: four cycles per instruction and five for STA.
`timescale 1ns/1ps
module tb_control_unit;
  import hp_pkg::*;
  import sha_ref_pkg::*;

  localparam int FILL_BITS = 48 * 32;

  logic clk = 0, rst = 1;
  word_t in_data;
  logic buf_full, buf_ack;
  logic [FILL_BITS-1:0] buf_data;
  logic tx_busy, tx_start;
  logic [7:0] tx_data;
  word_t mem_do, acc;
  logic mem_wr;
  logic [4:0] mem_addr, pc;
  dp_ctrl_t ctrl;
  logic halted;

  word_t pmem [32];
  word_t prog [32];
  word_t msg  [16];
  int checks = 0, failures = 0;
  int cycle = 0;
  int msg_writes = 0;
  logic [7:0] tx_bytes [$];
  int busy_left = 0;
  int t_add = -1, t_sub = -1, t_and = -1, t_rrgf1 = -1, t_sha1 = -1, t_srgf1 = -1,
      t_rrgf2 = -1, t_sha2 = -1, t_srgf2 = -1, t_memwr = -1;

  control_unit dut (.clk, .rst, .in_data, .buf_full, .buf_data, .buf_ack,
                    .tx_busy, .tx_start, .tx_data, .mem_do, .mem_wr, .mem_addr,
                    .ctrl, .acc, .pc, .halted);

  always #5 clk = ~clk;

  assign mem_do = pmem[mem_addr];

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %08h expected %08h", what, got, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Program memory model, transmitter model and event monitor.
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (mem_wr) pmem[mem_addr] <= acc;
    if (busy_left > 0) busy_left <= busy_left - 1;
    if (tx_start) begin
      if (tx_busy) begin failures++; $display("FAIL tx_start while busy"); end
      tx_bytes.push_back(tx_data);
      busy_left <= 3;
    end
    if (ctrl.m_we && !rst) begin
      check($sformatf("message word %0d", msg_writes), acc, msg[msg_writes % 16]);
      check("message address", 32'(ctrl.round), 32'(msg_writes));
      msg_writes <= msg_writes + 1;
    end
    if (ctrl.alu_e && ctrl.alu_sel == SEL_ADD)  t_add  <= cycle;
    if (ctrl.alu_e && ctrl.alu_sel == SEL_SUB)  t_sub  <= cycle;
    if (ctrl.alu_e && ctrl.alu_sel == SEL_AND)  t_and  <= cycle;
    if (ctrl.alu_e && ctrl.alu_sel == SEL_SHA1) t_sha1 <= cycle;
    if (ctrl.alu_e && ctrl.alu_sel == SEL_SHA2) t_sha2 <= cycle;
    if (mem_wr && t_and >= 0 && t_memwr < 0) t_memwr <= cycle;
    if (ctrl.rf_re == 8'b0001_1111) begin
      t_rrgf1 <= cycle;
      for (int p = 0; p < 5; p++) check("RRGF1 address", 32'(ctrl.rf_ra[p]), p);
    end
    if (ctrl.rf_re == 8'hFF) begin
      t_rrgf2 <= cycle;
      for (int p = 0; p < 8; p++) check("RRGF2 address", 32'(ctrl.rf_ra[p]), 5 + p);
    end
    if (ctrl.rf_we) begin
      if (ctrl.rf_wa[0] == 4'd0) begin
        t_srgf1 <= cycle;
        for (int p = 0; p < 8; p++) check("SRGF1 address", 32'(ctrl.rf_wa[p]), (p < 5) ? p : 8 + p);
      end else begin
        t_srgf2 <= cycle;
        for (int p = 0; p < 8; p++) check("SRGF2 address", 32'(ctrl.rf_wa[p]), 5 + p);
      end
    end
  end
  assign tx_busy = busy_left > 0;

  initial begin
    for (int i = 0; i < 32; i++) begin prog[i] = '0; pmem[i] = '0; end
    prog[5'h00] = ins(4'b0000, 5'h1F);  // LDA 1F      acc = 5
    prog[5'h01] = ins(4'b0010, 5'h1E);  // ADD 1E      acc = 8
    prog[5'h02] = ins(4'b0011, 5'h1D);  // SUB 1D      acc = -2
    prog[5'h03] = ins(4'b0110, 5'h1C);  // JMPP 1C     not taken
    prog[5'h04] = ins(4'b1001, 5'h1B);  // AND 1B      acc = 0000FFFE
    prog[5'h05] = ins(4'b1000, 5'h1A);  // STA 1A
    prog[5'h06] = ins(4'b0000, 5'h1A);  // LDA 1A
    prog[5'h07] = ins(4'b0110, 5'h09);  // JMPP 09     taken
    prog[5'h08] = ins(4'b0111, 5'h00);  // HALT        skipped
    prog[5'h09] = ins(4'b0100, 5'h00);  // INPUT       acc = 0
    prog[5'h0A] = ins(4'b1111, 5'h0C);  // JMPZ 0C     taken
    prog[5'h0B] = ins(4'b0111, 5'h00);  // HALT        skipped
    prog[5'h0C] = ins(4'b1100, 5'h00);  // RRGF1
    prog[5'h0D] = ins(4'b0001, 5'h00);  // SHA1
    prog[5'h0E] = ins(4'b1011, 5'h00);  // SRGF1
    prog[5'h0F] = ins(4'b1110, 5'h00);  // RRGF2
    prog[5'h10] = ins(4'b1010, 5'h00);  // SHA2
    prog[5'h11] = ins(4'b1101, 5'h00);  // SRGF2
    prog[5'h12] = ins(4'b0000, 5'h19);  // LDA 19
    prog[5'h13] = ins(4'b0101, 5'h00);  // OUT
    prog[5'h14] = ins(4'b0111, 5'h00);  // HALT
    prog[5'h19] = 32'hA1B2C3D4;
    prog[5'h1A] = 32'h0;
    prog[5'h1B] = 32'h0000FFFF;
    prog[5'h1C] = 32'h0;
    prog[5'h1D] = 32'd10;
    prog[5'h1E] = 32'd3;
    prog[5'h1F] = 32'd5;
    for (int i = 0; i < 16; i++) msg[i] = $urandom;
    for (int i = 0; i < 32; i++) buf_data[32*i +: 32] = prog[i];
    for (int i = 0; i < 16; i++) buf_data[32*(32+i) +: 32] = msg[i];
    in_data = 32'h0;
    buf_full = 0;
    repeat (3) @(posedge clk); #1;
    rst = 0;
    repeat (5) @(posedge clk); #1;
    check("idle while buffer empty", {31'd0, halted}, 0);
    buf_full = 1;
    #1 check("acknowledge", {31'd0, buf_ack}, 1);
    @(posedge clk); #1;
    buf_full = 0;
    wait (halted);
    @(posedge clk); #1;
    for (int i = 0; i < 32; i++)
      check($sformatf("program word %0d", i), pmem[i], (i == 5'h1A) ? 32'h0000FFFE : prog[i]);
    check("message words written", msg_writes, 16);
    check("final accumulator", acc, 32'hA1B2C3D4);
    check("halt address", 32'(pc), 32'h15);
    check("bytes sent", tx_bytes.size(), 4);
    if (tx_bytes.size() == 4) begin
      check("byte 0", tx_bytes[0], 8'hA1);
      check("byte 1", tx_bytes[1], 8'hB2);
      check("byte 2", tx_bytes[2], 8'hC3);
      check("byte 3", tx_bytes[3], 8'hD4);
    end
    check("ADD to SUB cycles", t_sub - t_add, 4);
    check("SUB to AND cycles (JMPP between)", t_and - t_sub, 8);
    check("STA write pulse", t_memwr - t_and, 5);
    check("AND to RRGF1 (STA five cycles)", t_rrgf1 - t_and, 25);
    check("RRGF1 to SHA1", t_sha1 - t_rrgf1, 4);
    check("SHA1 to SRGF1", t_srgf1 - t_sha1, 4);
    check("SRGF1 to RRGF2", t_rrgf2 - t_srgf1, 4);
    check("RRGF2 to SHA2", t_sha2 - t_rrgf2, 4);
    check("SHA2 to SRGF2", t_srgf2 - t_sha2, 4);
    repeat (20) @(posedge clk); #1;
    check("stays halted", {31'd0, halted}, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
