// uart_tx: UART transmitter, 8 data bits, no parity, 1 stop bit, LSB first.
//
// When `ready` is high, a `start` pulse takes `data` and sends a low start
// bit, the eight data bits LSB first and a high stop bit, each
// CLKS_PER_BIT system clocks long; the line idles high. `ready` drops on
// the clock after `start` and rises again when the stop bit has been on
// the line for a full bit period, 10 * CLKS_PER_BIT clocks later. A
// `start` while not ready is ignored. The default is 115200 baud from
// 50 MHz.
module uart_tx #(
  parameter int unsigned CLKS_PER_BIT = bell202_pkg::K_HOST  // 434
) (
  input  logic       clk,
  input  logic       reset,
  input  logic [7:0] data,
  input  logic       start,
  output logic       txd,
  output logic       ready
);

  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);

  logic [8:0]    frame;    // stop bit and data, sent from bit 0 after the start bit
  logic [3:0]    bits_left;
  logic [CW-1:0] timer;

  assign ready = (bits_left == 0);

  always_ff @(posedge clk) begin
    if (reset) begin
      frame     <= '1;
      bits_left <= '0;
      timer     <= '0;
      txd       <= 1'b1;
    end else if (ready) begin
      txd <= 1'b1;
      if (start) begin
        frame     <= {1'b1, data};
        bits_left <= 4'd10;
        timer     <= CW'(CLKS_PER_BIT - 1);
        txd       <= 1'b0;
      end
    end else begin
      if (timer != 0) timer <= timer - 1'b1;
      else begin
        timer     <= CW'(CLKS_PER_BIT - 1);
        bits_left <= bits_left - 1'b1;
        frame     <= {1'b1, frame[8:1]};
        txd       <= frame[0];   // data bits, then the stop bit, then idle
      end
    end
  end

endmodule
