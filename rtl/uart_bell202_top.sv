// uart_bell202_top: UART-to-Bell202 converter.
//
// Characters typed on a PC terminal arrive on `rx` at 115200 baud. The data
// logger echoes them on `tx`, collects a line and hands it over one byte at
// a time, each with a short load pulse, on an 8-bit bus whose bits feed the
// transmitter's eight data inputs. The Bell 202 transmitter sends each byte
// MSB first at 1200 baud as audio-band FSK with square-wave tones, 1200 Hz
// for a 1 and 2200 Hz for a 0, without phase continuity, on
// `out_fsk_data`, inside an `enable` window of 8 bit periods (6.67 ms).
// The tone oscillators, the serial bit stream and the bit clock are brought
// out for measurement. Output names follow the board pin list of the
// design description.
//
// One 50 MHz clock drives everything. `reset` is synchronous and active
// high; the logger receives it inverted as its active-low reset. All
// parameters default to the full-rate design.
module uart_bell202_top #(
  parameter int unsigned K_HOST      = bell202_pkg::K_HOST,        // 115200 baud
  parameter int unsigned K_BAUD      = bell202_pkg::K_BAUD,        // 1200 baud
  parameter int unsigned K_MARK      = bell202_pkg::K_MARK,        // 1200 Hz
  parameter int unsigned K_SPACE     = bell202_pkg::K_SPACE,       // 2200 Hz
  parameter int unsigned PACKET_WAIT = 10 * bell202_pkg::K_BAUD,   // between loads
  parameter int unsigned DEPTH       = 64                          // line buffer
) (
  input  logic clk_50mhz,
  input  logic reset,
  input  logic rx,
  output logic tx,
  output logic out_fsk_data,
  output logic enable,
  output logic mark,
  output logic space,
  output logic out_piso,
  output logic clk_piso,
  output logic sending
);

  logic [7:0] data_bus;   // 8-bit bus from the logger, one wire per data input
  logic       data_load;

  data_logger #(
    .CLKS_PER_BIT(K_HOST), .PACKET_WAIT(PACKET_WAIT), .DEPTH(DEPTH)
  ) u_logger (
    .clk(clk_50mhz), .reset_n(!reset), .rxd(rx), .txd(tx),
    .data(data_bus), .data_load, .sending
  );

  bell202_transmitter #(
    .K_BAUD(K_BAUD), .K_MARK(K_MARK), .K_SPACE(K_SPACE),
    .N_BITS(bell202_pkg::DATA_BITS)
  ) u_tx (
    .clk_50mhz, .reset, .data(data_bus), .data_load,
    .out_fsk(out_fsk_data), .enable, .mark_monitor(mark),
    .space_monitor(space), .out_piso_monitor(out_piso),
    .clk_piso_monitor(clk_piso)
  );

endmodule
