// timer_8: counts the bit clocks of one packet and flags the last one.
//
// While `enable` is high the counter advances on every bit-clock edge
// (`tick`). On the edge that finds the count at N-1 (the eighth edge for
// N = 8) `done` is raised and the count returns to 0. While `enable` is
// low the count is held at 0 and `done` stays low, so every window starts
// counting from zero; clearing the count there is this design's choice.
//
// `done` is combinational from the registered count and `tick`, so it is
// high in exactly the clock cycle of the eighth edge; the window flip-flop
// that it clears then closes on that same edge.
module timer_8 #(
  parameter int unsigned N = bell202_pkg::DATA_BITS  // edges per window
) (
  input  logic clk,
  input  logic reset,
  input  logic enable,
  input  logic tick,
  output logic done
);

  localparam int unsigned CW = (N > 2) ? $clog2(N) : 1;

  logic [CW-1:0] count;

  always_ff @(posedge clk) begin
    if (reset || !enable) count <= '0;
    else if (tick) begin
      if (count == CW'(N - 1)) count <= '0;
      else                     count <= count + 1'b1;
    end
  end

  assign done = enable && tick && (count == CW'(N - 1));

endmodule
