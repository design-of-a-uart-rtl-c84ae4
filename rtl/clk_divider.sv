// clk_divider: divide-by-K square-wave generator.
//
// A counter runs from 0 to K-1 on the system clock and wraps, so the output
// period is exactly K system clocks, f_out = f_clk / K. The output is low
// while the count is below K/2 and high for the rest of the period, a 50 %
// duty cycle (one clock longer high when K is odd). The same parametric
// divider makes the 1200 Hz mark tone, the 2200 Hz space tone and the
// 1200 Hz bit clock; K is the only thing that changes, as in the design
// description (K = T_out / T_clk).
//
// Besides the square wave, `rise` is a one-clock pulse in the first clock of
// each high phase. Logic that must act on the divided clock's rising edge
// uses it as a clock enable, so the whole converter stays in the single
// 50 MHz clock domain instead of clocking flip-flops from a divided net;
// that is this design's choice.
//
// Reset is synchronous and active high: it clears the count and holds the
// output low. The first rising edge follows K/2 clocks after reset is
// released.
module clk_divider #(
  parameter int unsigned K = bell202_pkg::K_MARK  // divide ratio, >= 2
) (
  input  logic clk,
  input  logic reset,
  output logic clk_d,   // square wave at f_clk / K
  output logic rise     // one-clock pulse when clk_d goes high
);

  localparam int unsigned CW   = (K > 2) ? $clog2(K) : 1;
  localparam int unsigned HALF = K / 2;

  logic [CW-1:0] count;
  logic [CW-1:0] count_next;

  always_comb begin
    if (count == CW'(K - 1)) count_next = '0;
    else                     count_next = count + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      count <= '0;
      clk_d <= 1'b0;
      rise  <= 1'b0;
    end else begin
      count <= count_next;
      clk_d <= (count_next >= CW'(HALF));
      rise  <= (count_next == CW'(HALF));
    end
  end

  initial assert (K >= 2) else $error("clk_divider: K must be at least 2");

endmodule
