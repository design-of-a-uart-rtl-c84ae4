// fsk_modulator: FSK modulator without phase continuity.
//
// Two free-running square-wave oscillators, one at the mark frequency
// (1200 Hz, sent for a logic 1) and one at the space frequency (2200 Hz,
// sent for a logic 0), and a switch that routes one of them to the output
// according to the data bit. The oscillators are never restarted, so at a
// bit change the output jumps to whatever phase the other tone has at that
// moment: the phase is not continuous, which is the modulator the design
// description builds. Both oscillators are divide-by-K counters on the
// system clock; K follows the description's formula K = T_out / T_clk.
//
// The switch is combinational, so `fsk` follows `data_bit` in the same
// cycle. `mark` and `space` bring the two oscillators out for measurement.
module fsk_modulator #(
  parameter int unsigned K_MARK  = bell202_pkg::K_MARK,   // 50 MHz / 1200 Hz
  parameter int unsigned K_SPACE = bell202_pkg::K_SPACE   // 50 MHz / 2200 Hz
) (
  input  logic clk,
  input  logic reset,
  input  logic data_bit,  // 1 = mark, 0 = space
  output logic fsk,
  output logic mark,
  output logic space
);

  clk_divider #(.K(K_MARK)) u_mark_osc (
    .clk, .reset, .clk_d(mark), .rise()
  );

  clk_divider #(.K(K_SPACE)) u_space_osc (
    .clk, .reset, .clk_d(space), .rise()
  );

  assign fsk = data_bit ? mark : space;

endmodule
