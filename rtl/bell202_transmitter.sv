// bell202_transmitter: turns one byte into a Bell 202 AFSK packet.
//
// A divide-by-K counter makes the 1200 Hz bit clock (CLK_PISO). A byte
// given on `data` with a `data_load` pulse is loaded into an 8-bit
// parallel-in serial-out register on the next bit-clock edge and then
// shifted out MSB first, one bit per bit period (OUT_PISO). The serial bit
// steers an FSK modulator without phase continuity: 1200 Hz square wave
// for a 1, 2200 Hz for a 0. The output buffer opens an ENABLE window of
// exactly 8 bit periods (6.67 ms, 150 Hz) from the loading edge and passes
// the modulated signal to OUT_FSK only inside it; outside it OUT_FSK is low.
// The mark and space oscillators and the bit clock run freely and are
// brought out as monitor outputs.
//
// Load handshake (this design's choice; the description only asks that
// DATA_LOAD be a short high pulse): `data_load` is sampled on every system
// clock. Each cycle it is high copies `data` into a holding register and
// raises a load request, which the next bit-clock edge serves. A pulse
// must therefore be shorter than one bit period (833 us); a longer one is
// served again on the following edge and the byte is sent twice. A request
// made while a packet is on the line waits for that packet's last edge, so
// back-to-back packets leave no gap. From `data_load` to the start of the
// window is 2 to K_BAUD + 1 system clocks; the packet then takes 8 * K_BAUD.
//
// All flip-flops run on the one system clock; the divided clocks act as
// clock enables. Reset is synchronous and active high.
module bell202_transmitter #(
  parameter int unsigned K_BAUD  = bell202_pkg::K_BAUD,   // 50 MHz / 1200 baud
  parameter int unsigned K_MARK  = bell202_pkg::K_MARK,   // 50 MHz / 1200 Hz
  parameter int unsigned K_SPACE = bell202_pkg::K_SPACE,  // 50 MHz / 2200 Hz
  parameter int unsigned N_BITS  = bell202_pkg::DATA_BITS
) (
  input  logic              clk_50mhz,
  input  logic              reset,
  input  logic [N_BITS-1:0] data,
  input  logic              data_load,
  output logic              out_fsk,
  output logic              enable,
  output logic              mark_monitor,
  output logic              space_monitor,
  output logic              out_piso_monitor,
  output logic              clk_piso_monitor
);

  logic              tick;       // bit-clock rising edge
  logic              load_req;
  logic [N_BITS-1:0] data_hold;
  logic              last;       // last edge of the current window
  logic              accept;     // this edge loads a new byte
  logic              piso_out;
  logic              fsk;

  clk_divider #(.K(K_BAUD)) u_bit_clock (
    .clk(clk_50mhz), .reset, .clk_d(clk_piso_monitor), .rise(tick)
  );

  assign accept = tick && load_req && (!enable || last);

  always_ff @(posedge clk_50mhz) begin
    if (reset) begin
      load_req  <= 1'b0;
      data_hold <= '0;
    end else if (data_load) begin
      load_req  <= 1'b1;
      data_hold <= data;
    end else if (accept) begin
      load_req  <= 1'b0;
    end
  end

  piso_register #(.WIDTH(N_BITS)) u_piso (
    .clk(clk_50mhz), .reset, .shift_en(tick), .load(accept),
    .pdata(data_hold), .sout(piso_out)
  );

  fsk_modulator #(.K_MARK(K_MARK), .K_SPACE(K_SPACE)) u_mod (
    .clk(clk_50mhz), .reset, .data_bit(piso_out),
    .fsk, .mark(mark_monitor), .space(space_monitor)
  );

  buffer_out #(.N_BITS(N_BITS)) u_buffer (
    .clk(clk_50mhz), .reset, .tick, .open(accept),
    .fsk_in(fsk), .fsk_out(out_fsk), .window(enable), .last
  );

  assign out_piso_monitor = piso_out;

endmodule
