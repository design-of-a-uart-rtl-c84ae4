// data_logger: UART front end that feeds the Bell 202 transmitter.
//
// It plays the part the design description gives to a soft processor and
// its firmware, in plain logic: it receives a string typed on a PC
// terminal over UART (115200 baud, 8N1), echoes each character back on
// `txd`, and stores it in a line buffer. A carriage return or line feed
// ends the string. The logger then sends the stored characters one at a
// time: it puts the character on `data` and raises `data_load` for one
// clock, and the next load follows PACKET_WAIT clocks later, until the
// buffer is empty. A terminator with no character before it is
// ignored.
//
// Choices of this design, where the description only gives the function:
// the echo is the "print the data received" of the firmware; the
// terminator is not sent; characters arriving while a string is being
// sent, or beyond the 64-character buffer, are dropped; the wait between
// loads is 10 bit periods of the 1200 baud line (8.33 ms), long enough for
// an 8-bit packet plus up to one bit of alignment, which leaves a two-bit
// gap between packets. `data` keeps the last character sent. `reset_n`
// is active low and synchronous, as the processor reset it replaces.
module data_logger #(
  parameter int unsigned CLKS_PER_BIT = bell202_pkg::K_HOST,           // 434
  parameter int unsigned PACKET_WAIT  = 10 * bell202_pkg::K_BAUD,      // 416670
  parameter int unsigned DEPTH        = 64
) (
  input  logic       clk,
  input  logic       reset_n,
  input  logic       rxd,
  output logic       txd,
  output logic [7:0] data,
  output logic       data_load,
  output logic       sending      // a string is being sent
);

  import bell202_pkg::*;

  typedef enum logic [1:0] {COLLECT, LOAD, WAIT} state_t;

  localparam int unsigned WW = $clog2(PACKET_WAIT + 1);

  logic          reset;
  state_t        state;
  logic [WW-1:0] wait_cnt;

  logic [7:0] rx_data;
  logic       rx_valid;
  logic       tx_ready;
  logic       echo_pending;
  logic [7:0] echo_data;

  logic       buf_push, buf_pop, buf_empty, buf_full;
  logic [7:0] buf_head;
  logic       is_term;

  assign reset = !reset_n;

  uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_rx (
    .clk, .reset, .rxd, .data(rx_data), .valid(rx_valid), .frame_err()
  );

  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_tx (
    .clk, .reset, .data(echo_data), .start(echo_pending), .txd,
    .ready(tx_ready)
  );

  line_buffer #(.DEPTH(DEPTH), .WIDTH(8)) u_buf (
    .clk, .reset, .push(buf_push), .wr_data(rx_data), .pop(buf_pop),
    .rd_data(buf_head), .empty(buf_empty), .full(buf_full), .count()
  );

  assign is_term  = (rx_data == ASCII_CR) || (rx_data == ASCII_LF);
  assign buf_push = (state == COLLECT) && rx_valid && !is_term;
  assign buf_pop  = (state == LOAD);

  // Echo: one character waits here until the transmitter is free.
  always_ff @(posedge clk) begin
    if (reset) begin
      echo_pending <= 1'b0;
      echo_data    <= '0;
    end else if (state == COLLECT && rx_valid) begin
      echo_pending <= 1'b1;
      echo_data    <= rx_data;
    end else if (tx_ready) begin
      echo_pending <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      state     <= COLLECT;
      wait_cnt  <= '0;
      data      <= '0;
      data_load <= 1'b0;
    end else begin
      data_load <= 1'b0;
      unique case (state)
        COLLECT: if (rx_valid && is_term && !buf_empty) state <= LOAD;
        LOAD: begin
          data      <= buf_head;
          data_load <= 1'b1;
          wait_cnt  <= WW'(PACKET_WAIT - 2);
          state     <= WAIT;
        end
        WAIT: begin
          if (wait_cnt != 0)  wait_cnt <= wait_cnt - 1'b1;
          else if (buf_empty) state <= COLLECT;
          else                state <= LOAD;
        end
        default: state <= COLLECT;
      endcase
    end
  end

  assign sending = (state != COLLECT);

  initial assert (PACKET_WAIT >= 2) else $error("data_logger: PACKET_WAIT must be at least 2");

  // a load pulse lasts one clock, well under one bit period
  a_load_pulse: assert property (@(posedge clk) disable iff (reset)
    data_load |=> !data_load);

endmodule
