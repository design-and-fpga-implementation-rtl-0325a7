// uart_rx: RS-232 byte receiver (8 data bits, no parity, 1 stop bit, least
// significant bit first).
//
// 'rxd' passes through a two-flop synchronizer. On a falling edge in idle the
// receiver counts OVERSAMPLE/2 ticks to the middle of the start bit and
// checks that it is still low, otherwise it returns to idle. It then samples
// each data bit and the stop bit OVERSAMPLE ticks apart. 'valid' pulses for
// one clock with 'data' when the stop bit is high. A low stop bit drops the
// byte and raises 'frame_err' for one clock.
// The document only names the receiver; frame format, oversampling and error
// handling are this design's choices.
module uart_rx #(
  parameter int unsigned OVERSAMPLE = 16
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       tick,
  input  logic       rxd,
  output logic [7:0] data,
  output logic       valid,
  output logic       frame_err
);

  typedef enum logic [1:0] {R_IDLE, R_START, R_DATA, R_STOP} rx_state_e;

  localparam int unsigned TW = $clog2(OVERSAMPLE);

  rx_state_e     state;
  logic [1:0]    sync;
  logic [TW-1:0] ticks;
  logic [2:0]    bit_idx;
  logic [7:0]    shreg;

  always_ff @(posedge clk) begin
    if (rst) begin
      sync      <= 2'b11;
      state     <= R_IDLE;
      ticks     <= '0;
      bit_idx   <= '0;
      shreg     <= '0;
      data      <= '0;
      valid     <= 1'b0;
      frame_err <= 1'b0;
    end else begin
      sync      <= {sync[0], rxd};
      valid     <= 1'b0;
      frame_err <= 1'b0;
      unique case (state)
        R_IDLE: begin
          ticks <= '0;
          if (!sync[1]) state <= R_START;
        end
        R_START: if (tick) begin
          if (32'(ticks) == OVERSAMPLE / 2 - 1) begin
            ticks   <= '0;
            bit_idx <= '0;
            state   <= sync[1] ? R_IDLE : R_DATA;
          end else ticks <= ticks + 1'b1;
        end
        R_DATA: if (tick) begin
          if (32'(ticks) == OVERSAMPLE - 1) begin
            ticks   <= '0;
            shreg   <= {sync[1], shreg[7:1]};
            bit_idx <= bit_idx + 1'b1;
            if (bit_idx == 3'd7) state <= R_STOP;
          end else ticks <= ticks + 1'b1;
        end
        R_STOP: if (tick) begin
          if (32'(ticks) == OVERSAMPLE - 1) begin
            ticks <= '0;
            state <= R_IDLE;
            if (sync[1]) begin
              data  <= shreg;
              valid <= 1'b1;
            end else begin
              frame_err <= 1'b1;
            end
          end else ticks <= ticks + 1'b1;
        end
        default: state <= R_IDLE;
      endcase
    end
  end

endmodule
