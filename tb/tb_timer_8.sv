// tb_timer_8: checks the 8-edge window timer.
//
// Bit-clock edges (`tick`) come every fourth clock. With `enable` held
// high, `done` must be high in the clock of every eighth tick and in no
// other clock. Dropping `enable` after five ticks must clear the count, so
// that the next `done` comes eight ticks after `enable` returns, and
// `done` must stay low while `enable` is low.
module tb_timer_8;

  logic clk = 1'b0;
  logic reset, enable, tick, done;
  int   checks = 0;
  int   failures = 0;

  always #5 clk = ~clk;

  timer_8 #(.N(8)) dut (.clk, .reset, .enable, .tick, .done);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // one bit period: three idle clocks then a tick clock; checks done in each
  task automatic period(input bit expect_done);
    tick = 1'b0;
    repeat (3) begin
      #1 check(done == 1'b0, "done only with a tick");
      @(posedge clk); #1;
    end
    tick = 1'b1;
    #1 check(done == expect_done, $sformatf("done=%0b expected %0b", done, expect_done));
    @(posedge clk); #1;
    tick = 1'b0;
  endtask

  initial begin
    reset = 1'b1; enable = 1'b0; tick = 1'b0;
    repeat (2) @(posedge clk);
    #1 reset = 1'b0;
    enable = 1'b1;
    for (int t = 1; t <= 24; t++) period(t % 8 == 0);
    for (int t = 1; t <= 5; t++) period(1'b0);
    enable = 1'b0;
    #1 check(done == 1'b0, "no done while disabled");
    for (int t = 1; t <= 10; t++) period(1'b0);
    enable = 1'b1;
    for (int t = 1; t <= 8; t++) period(t == 8);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
