// sr_latch: set/reset storage bit that holds the output window open.
//
// Built as a clocked set/reset flip-flop rather than a level-sensitive
// latch, so that the window logic is free of combinational loops and
// times with the rest of the converter; that is this design's choice.
// `s` sets q, `r` clears it, and when both arrive in the same clock the set
// wins, so a new packet that starts on the edge that ends the previous one
// keeps the window open. q changes on the clock edge that samples s or r.
// The synchronous reset clears q.
module sr_latch (
  input  logic clk,
  input  logic reset,
  input  logic s,
  input  logic r,
  output logic q
);

  always_ff @(posedge clk) begin
    if (reset)  q <= 1'b0;
    else if (s) q <= 1'b1;
    else if (r) q <= 1'b0;
  end

endmodule
