// uart_rx: UART receiver, 8 data bits, no parity, 1 stop bit, LSB first.
//
// The line is first passed through two flip-flops to bring it into the
// clock domain. A falling edge on the idle-high line starts a frame; the
// receiver waits half a bit and checks that the line is still low (a
// shorter pulse is ignored as a glitch), then samples each data bit and
// the stop bit in the middle of its bit period, CLKS_PER_BIT system clocks
// apart. A frame with a high stop bit is delivered as a one-clock `valid`
// pulse with the byte on `data`, about 9.5 bit periods after the start
// edge; a frame with a low stop bit is dropped and `frame_err` pulses.
// The default is 115200 baud from 50 MHz, the host link rate of the design
// description; the framing is the usual 8N1 of a PC terminal.
module uart_rx #(
  parameter int unsigned CLKS_PER_BIT = bell202_pkg::K_HOST  // 434
) (
  input  logic       clk,
  input  logic       reset,
  input  logic       rxd,
  output logic [7:0] data,
  output logic       valid,
  output logic       frame_err
);

  typedef enum logic [1:0] {IDLE, START, DATA, STOP} state_t;

  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);

  state_t        state;
  logic [CW-1:0] timer;
  logic [2:0]    bit_idx;
  logic [7:0]    shreg;
  logic [1:0]    sync;
  logic          rx;

  always_ff @(posedge clk) begin
    if (reset) sync <= 2'b11;
    else       sync <= {sync[0], rxd};
  end
  assign rx = sync[1];

  always_ff @(posedge clk) begin
    if (reset) begin
      state     <= IDLE;
      timer     <= '0;
      bit_idx   <= '0;
      shreg     <= '0;
      data      <= '0;
      valid     <= 1'b0;
      frame_err <= 1'b0;
    end else begin
      valid     <= 1'b0;
      frame_err <= 1'b0;
      unique case (state)
        IDLE: if (!rx) begin
          state <= START;
          timer <= CW'(CLKS_PER_BIT / 2 - 1);
        end
        START: begin
          if (timer != 0) timer <= timer - 1'b1;
          else if (rx) state <= IDLE;  // glitch, not a start bit
          else begin
            state   <= DATA;
            timer   <= CW'(CLKS_PER_BIT - 1);
            bit_idx <= '0;
          end
        end
        DATA: begin
          if (timer != 0) timer <= timer - 1'b1;
          else begin
            shreg <= {rx, shreg[7:1]};
            timer <= CW'(CLKS_PER_BIT - 1);
            if (bit_idx == 3'd7) state <= STOP;
            bit_idx <= bit_idx + 1'b1;
          end
        end
        STOP: begin
          if (timer != 0) timer <= timer - 1'b1;
          else begin
            state <= IDLE;
            if (rx) begin
              data  <= shreg;
              valid <= 1'b1;
            end else begin
              frame_err <= 1'b1;
            end
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

endmodule
