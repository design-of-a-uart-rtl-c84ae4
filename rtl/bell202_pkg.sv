// bell202_pkg: constants shared by the UART-to-Bell202 converter.
//
// The converter runs from a single 50 MHz board clock. Every tone and bit
// rate is made by a divide-by-K counter, with K = f_clk / f_out rounded to
// the nearest integer. The Bell 202 rates (1200 baud, 1200 Hz mark,
// 2200 Hz space) and the 115200 baud host link follow the design
// description; the rounding of K and the line buffer depth are this
// design's own choices.
package bell202_pkg;

  localparam int unsigned CLK_HZ        = 50_000_000;
  localparam int unsigned BELL_BAUD     = 1200;    // Bell 202 bit rate
  localparam int unsigned MARK_HZ       = 1200;    // logic 1
  localparam int unsigned SPACE_HZ      = 2200;    // logic 0
  localparam int unsigned HOST_BAUD     = 115200;  // UART link to the PC
  localparam int unsigned DATA_BITS     = 8;       // one UART character per packet

  // Divide ratio for an output frequency: round(CLK_HZ / f_out).
  function automatic int unsigned div_k(int unsigned clk_hz, int unsigned f_out);
    return (clk_hz + f_out / 2) / f_out;
  endfunction

  localparam int unsigned K_BAUD  = div_k(CLK_HZ, BELL_BAUD);   // 41667
  localparam int unsigned K_MARK  = div_k(CLK_HZ, MARK_HZ);     // 41667
  localparam int unsigned K_SPACE = div_k(CLK_HZ, SPACE_HZ);    // 22727
  localparam int unsigned K_HOST  = div_k(CLK_HZ, HOST_BAUD);   // 434

  // Line terminators that end a string typed on the host terminal.
  localparam logic [7:0] ASCII_CR = 8'h0D;
  localparam logic [7:0] ASCII_LF = 8'h0A;

endpackage
