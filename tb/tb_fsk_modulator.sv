// tb_fsk_modulator: checks the FSK modulator without phase continuity.
//
// Scaled oscillators (mark K = 12, space K = 7 clocks) let the test run
// quickly. The data bit changes at random every 20 clocks. Every clock the
// output must be the mark tone for a 1 and the space tone for a 0. Both
// oscillators must keep their own period (12 and 7 clocks between rising
// edges) however the data bit changes, which shows they are never
// restarted at a bit change. At least one bit change must find the two
// tones at different levels, where the output jumps in phase.
module tb_fsk_modulator;

  localparam int unsigned KM = 12;
  localparam int unsigned KS = 7;

  logic clk = 1'b0;
  logic reset, data_bit, fsk, mark, space;
  int   checks = 0;
  int   failures = 0;
  int   mark_last, space_last, cyc, jumps;
  logic mark_q, space_q, bit_q;

  always #5 clk = ~clk;

  fsk_modulator #(.K_MARK(KM), .K_SPACE(KS)) dut (.clk, .reset, .data_bit, .fsk, .mark, .space);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  always @(negedge clk) if (!reset) begin
    cyc++;
    check(fsk == (data_bit ? mark : space), "switch selects mark for 1, space for 0");
    if (mark && !mark_q) begin
      if (mark_last >= 0) check(cyc - mark_last == KM, $sformatf("mark period %0d", cyc - mark_last));
      mark_last = cyc;
    end
    if (space && !space_q) begin
      if (space_last >= 0) check(cyc - space_last == KS, $sformatf("space period %0d", cyc - space_last));
      space_last = cyc;
    end
    if (data_bit != bit_q && mark != space) jumps++;
    mark_q = mark; space_q = space; bit_q = data_bit;
  end

  initial begin
    reset = 1'b1; data_bit = 1'b0;
    cyc = 0; mark_last = -1; space_last = -1; jumps = 0;
    mark_q = 1'b0; space_q = 1'b0; bit_q = 1'b0;
    repeat (3) @(posedge clk);
    reset = 1'b0;
    for (int n = 0; n < 100; n++) begin
      @(posedge clk);
      data_bit = 1'($urandom);
      repeat (19) @(posedge clk);
    end
    check(jumps > 0, $sformatf("%0d phase jumps at bit changes", jumps));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
