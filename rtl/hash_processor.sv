// hash_processor: a small 32-bit processor whose instruction set includes one
// SHA-1 round, one SHA-256 round and the moves of the chaining variables.
// A short program loop therefore hashes a 512-bit message block.
//
// A host sends, over RS-232 at the rate picked by 'baud_sel', 48 words:
// 32 program memory words (program plus its data words), then the 16 words
// of one padded message block. Each word goes least significant byte first.
// The control unit copies them into the program memory and the message RAM
// and runs the program. When it reaches HALT, 'halted' rises and 'chain'
// holds the working variables after the last round (A..E for SHA-1, A..H for
// SHA-256). The register file starts from the standard initial hash values
// after reset, so the digest word i is H_i(0) + chain[i]. The program may
// also send the accumulator back over 'txd' with the OUT instruction (opcode
// 0101). 'in_data' is the value read by INPUT (opcode 0100).
// The block structure (control unit, program memory, datapath, UART
// interface) follows the document's general block diagram. The top-level
// observation ports are this design's choice.
module hash_processor
  import hp_pkg::*;
#(
  parameter int unsigned CLK_HZ     = 100_000_000,
  parameter int unsigned PROG_WORDS = 32,
  parameter int unsigned MSG_WORDS  = 16
) (
  input  logic               clk,
  input  logic               rst,
  input  logic [3:0]         baud_sel,
  input  logic               rxd,
  output logic               txd,
  input  word_t              in_data,
  output word_t              chain [8],
  output word_t              acc,
  output logic [PADDR_W-1:0] pc,
  output logic               halted,
  output word_t              alu_out,
  output logic               alu_sign,
  output logic               rx_frame_err
);

  localparam int unsigned FILL_BITS = (PROG_WORDS + MSG_WORDS) * WORD_W;

  logic                 buf_full, buf_ack;
  logic [FILL_BITS-1:0] buf_data;
  logic                 tx_start, tx_busy;
  logic [7:0]           tx_data;
  logic                 mem_wr;
  logic [PADDR_W-1:0]   mem_addr;
  word_t                mem_do;
  dp_ctrl_t             ctrl;

  uart_interface #(.CLK_HZ(CLK_HZ), .FILL_BITS(FILL_BITS)) u_uart (
    .clk(clk), .rst(rst), .baud_sel(baud_sel), .rxd(rxd), .txd(txd),
    .buf_full(buf_full), .buf_data(buf_data), .buf_ack(buf_ack),
    .tx_start(tx_start), .tx_data(tx_data), .tx_busy(tx_busy),
    .rx_frame_err(rx_frame_err));

  control_unit #(.PROG_WORDS(PROG_WORDS), .MSG_WORDS(MSG_WORDS)) u_ctrl (
    .clk(clk), .rst(rst), .in_data(in_data),
    .buf_full(buf_full), .buf_data(buf_data), .buf_ack(buf_ack),
    .tx_busy(tx_busy), .tx_start(tx_start), .tx_data(tx_data),
    .mem_do(mem_do), .mem_wr(mem_wr), .mem_addr(mem_addr),
    .ctrl(ctrl), .acc(acc), .pc(pc), .halted(halted));

  program_memory #(.DEPTH(PROG_WORDS)) u_pmem (
    .clk(clk), .we(mem_wr), .a(mem_addr), .di(acc), .dout(mem_do));

  datapath u_dp (
    .clk(clk), .rst(rst), .ctrl(ctrl), .acc(acc), .mem_data(mem_do),
    .chain(chain), .alu_out(alu_out), .alu_sign(alu_sign));

endmodule
