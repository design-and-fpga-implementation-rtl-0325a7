// control_unit: the hash processor's controller. It is a finite state machine
// that loads the program, then fetches, decodes and executes instructions,
// driving the program memory and the datapath.
//
// Load. The controller waits in S_INIT until the UART's serial buffer is full.
// It then copies the buffer into its 'data' register and acknowledges with a
// one-cycle buf_ack. The lowest 32 bits of 'data' go through the accumulator
// into program memory address 0. 'data' is shifted right by 32 and the next
// word goes to address 1, and so on up to address 31. Each word takes
// S_FILL_1 (accumulator and address set), S_FILL_2 (write enable raised) and
// S_FILL_3 (write enable lowered, count advanced). The next MSG_WORDS words of
// the buffer are then written into message RAM entries 0..15 (S_MSG_1,
// S_MSG_2), after which S_END leads to S_START.
//
// Run. Every instruction passes S_START (memory address <= PC), S_FETCH
// (IR <= memory, PC <= PC+1) and S_DECODE (memory address <= IR[4:0], next
// state <= opcode IR[8:5]). One execute state then follows, so an
// instruction takes four cycles, and STA takes five (S_STORE raises the
// write, S_STORE2 lowers it; the word is written on the edge that ends
// S_STORE2). LDA, ADD, SUB and AND work on the accumulator and the addressed
// memory word. The datapath ALU repeats ADD/SUB/AND on the same operands so
// that their results show on its outputs. JMPP jumps when the accumulator is
// positive, i.e. nonzero with the sign bit clear. JMPZ jumps when it is zero.
// RRGF1/RRGF2 latch the SHA-1 (registers 0-4) or SHA-256 (registers 5-12)
// chaining variables into the register file's read ports. SHA1/SHA2 enable
// the ALU for one round. SRGF1/SRGF2 write the ALU results back. During
// SRGF1 the unused write ports 6-8 target the spare registers 13-15. The
// round number given to the datapath is the accumulator's low seven bits, so
// a program loads its round counter just before the round. HALT stops for
// good; only reset restarts, and reset returns to S_INIT.
// Opcode 0100 (INPUT) loads the accumulator from 'in_data'. Opcode 0101 (OUT)
// sends the accumulator over the UART transmitter, most significant byte
// first. Only bits [8:0] of an instruction word are decoded; bits [31:9]
// are held in the instruction register but have no meaning.
//
// The states, their order, the opcode map and the fill sequence for the 32
// program words follow the document. The message word fill, the
// accumulator-as-round-number rule, the INPUT/OUT behaviour, the buffer
// handshake, the 5-bit program counter and the register numbers used by
// RRGF/SRGF are this design's choices.
module control_unit
  import hp_pkg::*;
#(
  parameter int unsigned PROG_WORDS = 32,
  parameter int unsigned MSG_WORDS  = 16,
  parameter int unsigned FILL_BITS  = (PROG_WORDS + MSG_WORDS) * WORD_W
) (
  input  logic                 clk,
  input  logic                 rst,
  input  word_t                in_data,    // value loaded by INPUT
  // serial buffer of the UART interface
  input  logic                 buf_full,
  input  logic [FILL_BITS-1:0] buf_data,
  output logic                 buf_ack,
  // UART transmitter
  input  logic                 tx_busy,
  output logic                 tx_start,
  output logic [7:0]           tx_data,
  // program memory
  input  word_t                mem_do,
  output logic                 mem_wr,
  output logic [PADDR_W-1:0]   mem_addr,
  // datapath
  output dp_ctrl_t             ctrl,
  output word_t                acc,
  // status
  output logic [PADDR_W-1:0]   pc,
  output logic                 halted
);

  typedef enum logic [4:0] {
    S_INIT, S_FILL_1, S_FILL_2, S_FILL_3, S_MSG_1, S_MSG_2, S_END,
    S_START, S_FETCH, S_DECODE,
    S_LOAD, S_ADD, S_SUB, S_AND, S_INPUT, S_OUT, S_JPOS, S_JZ, S_HALT,
    S_STORE, S_STORE2, S_SHA1, S_SHA2, S_SRGF1, S_SRGF2, S_RRGF1, S_RRGF2
  } state_e;

  state_e               state;
  word_t                ir;
  logic [FILL_BITS-1:0] data;
  logic [PADDR_W-1:0]   instr_count;
  logic [3:0]           msg_count;
  logic [1:0]           out_byte;
  opcode_e              opcode;
  logic [PADDR_W-1:0]   mem_addr_q;

  assign opcode   = opcode_e'(ir[8:5]);
  assign mem_addr = mem_addr_q;
  assign halted   = (state == S_HALT);

  function automatic state_e exec_state(opcode_e op);
    unique case (op)
      OP_LDA:   return S_LOAD;
      OP_SHA1:  return S_SHA1;
      OP_ADD:   return S_ADD;
      OP_SUB:   return S_SUB;
      OP_INPUT: return S_INPUT;
      OP_OUT:   return S_OUT;
      OP_JMPP:  return S_JPOS;
      OP_HALT:  return S_HALT;
      OP_STA:   return S_STORE;
      OP_AND:   return S_AND;
      OP_SHA2:  return S_SHA2;
      OP_SRGF1: return S_SRGF1;
      OP_RRGF1: return S_RRGF1;
      OP_SRGF2: return S_SRGF2;
      OP_RRGF2: return S_RRGF2;
      OP_JMPZ:  return S_JZ;
      default:  return S_HALT;
    endcase
  endfunction

  // Sequential part: state, accumulator, PC, IR, memory address and write.
  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= S_INIT;
      acc         <= '0;
      pc          <= '0;
      ir          <= '0;
      data        <= '0;
      instr_count <= '0;
      msg_count   <= '0;
      out_byte    <= '0;
      mem_addr_q  <= '0;
      mem_wr      <= 1'b0;
    end else begin
      unique case (state)
        S_INIT: begin
          instr_count <= '0;
          msg_count   <= '0;
          if (buf_full) begin
            data  <= buf_data;
            state <= S_FILL_1;
          end
        end
        S_FILL_1: begin
          acc        <= data[WORD_W-1:0];
          mem_addr_q <= instr_count;
          state      <= S_FILL_2;
        end
        S_FILL_2: begin
          mem_wr <= 1'b1;
          state  <= S_FILL_3;
        end
        S_FILL_3: begin
          mem_wr      <= 1'b0;
          instr_count <= instr_count + 1'b1;
          data        <= data >> WORD_W;
          state       <= (32'(instr_count) == PROG_WORDS - 1) ? S_MSG_1 : S_FILL_1;
        end
        S_MSG_1: begin
          acc   <= data[WORD_W-1:0];
          state <= S_MSG_2;
        end
        S_MSG_2: begin
          msg_count <= msg_count + 1'b1;
          data      <= data >> WORD_W;
          state     <= (32'(msg_count) == MSG_WORDS - 1) ? S_END : S_MSG_1;
        end
        S_END:   state <= S_START;
        S_START: begin
          mem_addr_q <= pc;
          state      <= S_FETCH;
        end
        S_FETCH: begin
          ir    <= mem_do;
          pc    <= pc + 1'b1;
          state <= S_DECODE;
        end
        S_DECODE: begin
          mem_addr_q <= ir[PADDR_W-1:0];
          out_byte   <= '0;
          state      <= exec_state(opcode);
        end
        S_LOAD:  begin acc <= mem_do;        state <= S_START; end
        S_ADD:   begin acc <= acc + mem_do;  state <= S_START; end
        S_SUB:   begin acc <= acc - mem_do;  state <= S_START; end
        S_AND:   begin acc <= acc & mem_do;  state <= S_START; end
        S_INPUT: begin acc <= in_data;       state <= S_START; end
        S_OUT: begin
          if (!tx_busy) begin
            out_byte <= out_byte + 1'b1;
            if (out_byte == 2'd3) state <= S_START;
          end
        end
        S_JPOS: begin
          if (acc != '0 && !acc[WORD_W-1]) pc <= ir[PADDR_W-1:0];
          state <= S_START;
        end
        S_JZ: begin
          if (acc == '0) pc <= ir[PADDR_W-1:0];
          state <= S_START;
        end
        S_HALT:   state <= S_HALT;
        S_STORE:  begin mem_wr <= 1'b1; state <= S_STORE2; end
        S_STORE2: begin mem_wr <= 1'b0; state <= S_START;  end
        default:  state <= S_START;   // SHA1, SHA2, SRGF*, RRGF*: one cycle each
      endcase
    end
  end

  // Combinational outputs: serial buffer acknowledge, UART transmit, datapath control.
  always_comb begin
    buf_ack  = (state == S_INIT) && buf_full;
    tx_start = (state == S_OUT) && !tx_busy;
    tx_data  = acc[WORD_W-1 - 8*out_byte -: 8];

    ctrl       = '0;
    ctrl.round = (state == S_MSG_2) ? ROUND_W'(msg_count) : acc[ROUND_W-1:0];
    ctrl.m_we  = (state == S_MSG_2);
    unique case (opcode)
      OP_SHA2: ctrl.alu_sel = SEL_SHA2;
      OP_ADD:  ctrl.alu_sel = SEL_ADD;
      OP_SUB:  ctrl.alu_sel = SEL_SUB;
      OP_AND:  ctrl.alu_sel = SEL_AND;
      default: ctrl.alu_sel = SEL_SHA1;
    endcase
    ctrl.alu_e = (state == S_SHA1) || (state == S_SHA2) ||
                 (state == S_ADD)  || (state == S_SUB)  || (state == S_AND);
    unique case (state)
      S_RRGF1: for (int p = 0; p < 5; p++) begin
        ctrl.rf_re[p] = 1'b1;
        ctrl.rf_ra[p] = RF_SHA1_BASE + RF_AW'(p);
      end
      S_RRGF2: for (int p = 0; p < RF_PORTS; p++) begin
        ctrl.rf_re[p] = 1'b1;
        ctrl.rf_ra[p] = RF_SHA2_BASE + RF_AW'(p);
      end
      S_SRGF1: begin
        ctrl.rf_we = 1'b1;
        for (int p = 0; p < RF_PORTS; p++)
          ctrl.rf_wa[p] = (p < 5) ? RF_SHA1_BASE + RF_AW'(p) : RF_SPARE_BASE + RF_AW'(p - 5);
      end
      S_SRGF2: begin
        ctrl.rf_we = 1'b1;
        for (int p = 0; p < RF_PORTS; p++) ctrl.rf_wa[p] = RF_SHA2_BASE + RF_AW'(p);
      end
      default: ;
    endcase
  end

endmodule
