// uart_interface: serial link between a host PC and the hash processor. It
// joins a baud generator, a receiver, a transmitter and the serial receive
// buffer.
//
// Received bytes are shifted into a FILL_BITS-wide buffer from the top, so
// the first byte received ends up in bits [7:0] of the buffer. A host
// therefore sends each 32-bit word least significant byte first and words in
// address order. When FILL_BITS/8 bytes have arrived, 'buf_full' rises and
// stays high until the controller pulses 'buf_ack'. That empties the buffer
// count. Bytes arriving while the buffer is full are dropped. The transmitter
// side passes 'tx_start', 'tx_data' and 'tx_busy' straight through. 'baud_sel'
// is the baud rate selection register (see uart_baud_gen). Two assertions
// state the handshake rules with the controller.
// The split into receiver, baud generator and transmitter, the receive buffer
// the controller waits on and the rate table follow the document; the buffer
// layout and the handshake are this design's choices.
module uart_interface #(
  parameter int unsigned CLK_HZ     = 100_000_000,
  parameter int unsigned OVERSAMPLE = 16,
  parameter int unsigned FILL_BITS  = 48 * 32
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [3:0]           baud_sel,
  input  logic                 rxd,
  output logic                 txd,
  output logic                 buf_full,
  output logic [FILL_BITS-1:0] buf_data,
  input  logic                 buf_ack,
  input  logic                 tx_start,
  input  logic [7:0]           tx_data,
  output logic                 tx_busy,
  output logic                 rx_frame_err
);

  localparam int unsigned NBYTES = FILL_BITS / 8;
  localparam int unsigned CW     = $clog2(NBYTES + 1);

  logic       tick;
  logic [7:0] rx_data;
  logic       rx_valid;
  logic [CW-1:0] count;

  uart_baud_gen #(.CLK_HZ(CLK_HZ), .OVERSAMPLE(OVERSAMPLE)) u_baud (
    .clk(clk), .rst(rst), .sel(baud_sel), .tick(tick));

  uart_rx #(.OVERSAMPLE(OVERSAMPLE)) u_rx (
    .clk(clk), .rst(rst), .tick(tick), .rxd(rxd),
    .data(rx_data), .valid(rx_valid), .frame_err(rx_frame_err));

  uart_tx #(.OVERSAMPLE(OVERSAMPLE)) u_tx (
    .clk(clk), .rst(rst), .tick(tick), .start(tx_start), .data(tx_data),
    .busy(tx_busy), .txd(txd));

  assign buf_full = (32'(count) == NBYTES);

  always_ff @(posedge clk) begin
    if (rst) begin
      count    <= '0;
      buf_data <= '0;
    end else if (buf_ack) begin
      count <= '0;
    end else if (rx_valid && !buf_full) begin
      buf_data <= {rx_data, buf_data[FILL_BITS-1:8]};
      count    <= count + 1'b1;
    end
  end

  // Handshake rules: the buffer is only taken when it is full, and a byte is
  // only handed to the transmitter when it is idle.
  a_ack_when_full: assert property (@(posedge clk) disable iff (rst) buf_ack |-> buf_full);
  a_tx_when_idle:  assert property (@(posedge clk) disable iff (rst) tx_start |-> !tx_busy);

endmodule
