// buffer_out: gate that lets the modulated signal onto the line for one
// 8-bit time window and holds the line low otherwise.
//
// An SR flip-flop holds the window (`window`, brought out as ENABLE). It
// is set by `open`, given on the bit-clock edge where the transmitter loads
// a new byte, and cleared by an 8-edge timer that runs while the window is
// open. The window is therefore exactly 8 bit periods long, 6.67 ms at
// 1200 baud. An AND gate passes `fsk_in` to `fsk_out` only while the window
// is open. `last` is the timer's end pulse, in the clock of the edge that
// closes the window. If `open` comes with `last` the window stays open and
// the next packet follows without a gap.
module buffer_out #(
  parameter int unsigned N_BITS = bell202_pkg::DATA_BITS
) (
  input  logic clk,
  input  logic reset,
  input  logic tick,     // bit-clock edge
  input  logic open,     // start a window (on a tick)
  input  logic fsk_in,
  output logic fsk_out,
  output logic window,
  output logic last
);

  timer_8 #(.N(N_BITS)) u_timer (
    .clk, .reset, .enable(window), .tick, .done(last)
  );

  sr_latch u_latch (
    .clk, .reset, .s(open), .r(last), .q(window)
  );

  assign fsk_out = fsk_in & window;

  // the window only closes on a bit-clock edge
  property p_close_on_tick;
    @(posedge clk) disable iff (reset) $fell(window) |-> $past(tick);
  endproperty
  a_close_on_tick: assert property (p_close_on_tick);

endmodule
