// uart_tx: RS-232 byte transmitter (8 data bits, no parity, 1 stop bit, least
// significant bit first).
//
// When 'start' is high and 'busy' low, the byte on 'data' is taken and 'busy'
// rises on the next clock. The transmitter then sends the start bit, the
// eight data bits and the stop bit, each for OVERSAMPLE baud ticks. 'busy'
// falls after the stop bit. 'txd' idles high.
// The document only names the transmitter; its format and handshake are this
// design's choices.
module uart_tx #(
  parameter int unsigned OVERSAMPLE = 16
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       tick,
  input  logic       start,
  input  logic [7:0] data,
  output logic       busy,
  output logic       txd
);

  localparam int unsigned TW = $clog2(OVERSAMPLE);

  logic [9:0]    frame;    // stop, data[7:0], start; bit 0 goes out first
  logic [3:0]    bits_left;
  logic [TW-1:0] ticks;

  assign txd = busy ? frame[0] : 1'b1;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy      <= 1'b0;
      frame     <= '1;
      bits_left <= '0;
      ticks     <= '0;
    end else if (!busy) begin
      if (start) begin
        frame     <= {1'b1, data, 1'b0};
        bits_left <= 4'd10;
        ticks     <= '0;
        busy      <= 1'b1;
      end
    end else if (tick) begin
      if (32'(ticks) == OVERSAMPLE - 1) begin
        ticks     <= '0;
        frame     <= {1'b1, frame[9:1]};
        bits_left <= bits_left - 1'b1;
        if (bits_left == 4'd1) busy <= 1'b0;
      end else ticks <= ticks + 1'b1;
    end
  end

endmodule
