// tb_sr_latch: checks the set/reset window flip-flop.
//
// Random set and reset requests are applied for many clocks; a reference
// model (set wins, then reset, else hold) predicts q after each edge. A
// reset in the middle must clear q.
module tb_sr_latch;

  logic clk = 1'b0;
  logic reset, s, r, q;
  logic model;
  int   checks = 0;
  int   failures = 0;

  always #5 clk = ~clk;

  sr_latch dut (.clk, .reset, .s, .r, .q);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    reset = 1'b1; s = 1'b0; r = 1'b0;
    repeat (2) @(posedge clk);
    #1 reset = 1'b0;
    model = 1'b0;
    check(q == 1'b0, "cleared by reset");
    for (int n = 0; n < 400; n++) begin
      s = ($urandom % 4) == 0;
      r = ($urandom % 3) == 0;
      @(posedge clk); #1;
      if (s)      model = 1'b1;
      else if (r) model = 1'b0;
      check(q == model, $sformatf("q after s=%0b r=%0b", s, r));
    end
    s = 1'b1; r = 1'b0;
    @(posedge clk); #1;
    s = 1'b0; reset = 1'b1;
    @(posedge clk); #1;
    check(q == 1'b0, "reset clears q");
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
