// uart_baud_gen: baud rate tick generator of the UART interface.
//
// From a CLK_HZ system clock it makes a one-cycle 'tick' at OVERSAMPLE times
// the baud rate chosen by the 4-bit selection register 'sel':
//   0110 -> 38400, 0101 -> 19200, 0100 -> 9600,
//   0011 -> 4800,  0010 -> 2400,  0001 -> 1200 baud.
// Any other code stops the ticks. The receiver samples on these ticks and
// the transmitter sends one bit per OVERSAMPLE ticks. The divisor is
// CLK_HZ / (baud * OVERSAMPLE), rounded to nearest. A change of 'sel' or a
// reset restarts the count.
// The six rates and their codes follow the document; the oversampling, the
// rounding and the behaviour for the other codes are this design's choices.
module uart_baud_gen #(
  parameter int unsigned CLK_HZ     = 100_000_000,
  parameter int unsigned OVERSAMPLE = 16
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [3:0] sel,
  output logic       tick
);

  function automatic int unsigned divisor(int unsigned baud);
    int unsigned d;
    d = (CLK_HZ + baud * OVERSAMPLE / 2) / (baud * OVERSAMPLE);
    return (d == 0) ? 1 : d;
  endfunction

  localparam int unsigned CW = $clog2(divisor(1200) + 1);

  logic [CW-1:0] limit, count;
  logic [3:0]    sel_q;
  logic          enabled;

  always_comb begin
    enabled = 1'b1;
    unique case (sel)
      4'b0110: limit = CW'(divisor(38400) - 1);
      4'b0101: limit = CW'(divisor(19200) - 1);
      4'b0100: limit = CW'(divisor(9600)  - 1);
      4'b0011: limit = CW'(divisor(4800)  - 1);
      4'b0010: limit = CW'(divisor(2400)  - 1);
      4'b0001: limit = CW'(divisor(1200)  - 1);
      default: begin limit = '0; enabled = 1'b0; end
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      count <= '0;
      tick  <= 1'b0;
      sel_q <= sel;
    end else begin
      sel_q <= sel;
      tick  <= 1'b0;
      if (!enabled || sel != sel_q) begin
        count <= '0;
      end else if (count >= limit) begin
        count <= '0;
        tick  <= 1'b1;
      end else begin
        count <= count + 1'b1;
      end
    end
  end

endmodule
