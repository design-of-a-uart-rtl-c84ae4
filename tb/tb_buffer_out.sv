// tb_buffer_out: checks the 8-bit output window.
//
// Bit-clock edges come every fifth clock and the FSK input toggles at
// random. A window opened on one edge must be high for exactly 8 bit
// periods (40 clocks), `last` must pulse on the edge that closes it, and
// the output must equal the input inside the window and be low outside.
// A second open on the closing edge must keep the window high for 16 bit
// periods in all.
module tb_buffer_out;

  localparam int unsigned P = 5;   // clocks per bit

  logic clk = 1'b0;
  logic reset, tick, open, fsk_in, fsk_out, window, last;
  int   checks = 0;
  int   failures = 0;
  int   win_len, last_count;

  always #5 clk = ~clk;

  buffer_out #(.N_BITS(8)) dut (.clk, .reset, .tick, .open, .fsk_in, .fsk_out, .window, .last);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // bit-clock edges and random line activity
  int unsigned phase;
  always_ff @(posedge clk) begin
    if (reset) phase <= 0;
    else       phase <= (phase == P - 1) ? 0 : phase + 1;
    fsk_in <= 1'($urandom);
  end
  assign tick = (phase == P - 1);

  // gate check every clock
  always @(negedge clk) if (!reset) begin
    check(fsk_out == (fsk_in & window), "output gated by window");
  end

  // window length and end pulses
  always_ff @(posedge clk) begin
    if (window && !reset) win_len <= win_len + 1;
    if (last && !reset) last_count <= last_count + 1;
  end

  task automatic open_on_tick();
    @(negedge clk);
    while (!tick) @(negedge clk);
    open = 1'b1;
    @(negedge clk);
    open = 1'b0;
  endtask

  initial begin
    reset = 1'b1; open = 1'b0; fsk_in = 1'b0;
    win_len = 0; last_count = 0;
    repeat (3) @(posedge clk);
    reset = 1'b0;
    repeat (12) @(negedge clk);
    check(window == 1'b0, "closed after reset");
    // single packet
    open_on_tick();
    check(window == 1'b1, "window opens after the edge");
    repeat (100) @(negedge clk);
    check(win_len == 8 * P, $sformatf("window %0d clocks, expected %0d", win_len, 8 * P));
    check(last_count == 1, $sformatf("%0d end pulses, expected 1", last_count));
    check(window == 1'b0, "window closed");
    // two packets back to back
    win_len = 0; last_count = 0;
    open_on_tick();
    @(negedge clk);
    while (!last) @(negedge clk);
    open = 1'b1;               // on the closing edge
    @(negedge clk);
    open = 1'b0;
    check(window == 1'b1, "window held open for the second packet");
    repeat (100) @(negedge clk);
    check(win_len == 16 * P, $sformatf("double window %0d clocks, expected %0d", win_len, 16 * P));
    check(last_count == 2, $sformatf("%0d end pulses, expected 2", last_count));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
