// tb_clk_divider: checks the divide-by-K square-wave generator.
//
// Two dividers, one even (K = 10) and one odd (K = 7), run side by side.
// For each the testbench measures, edge by edge, the period between rising
// edges (must be K clocks), the length of the high phase (K - K/2) and the
// low phase (K/2), that `rise` is high exactly in the first high clock,
// and that the first rising edge comes K/2 clocks after reset.
module tb_clk_divider;

  localparam int unsigned KA = 10;
  localparam int unsigned KB = 7;

  logic clk = 1'b0;
  logic reset;
  logic da, ra, db, rb;
  int   checks = 0;
  int   failures = 0;

  always #5 clk = ~clk;

  clk_divider #(.K(KA)) dut_a (.clk, .reset, .clk_d(da), .rise(ra));
  clk_divider #(.K(KB)) dut_b (.clk, .reset, .clk_d(db), .rise(rb));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Measure one divider for several periods.
  task automatic measure(input int unsigned k, ref logic d, ref logic r, input string name);
    int unsigned first, lo, hi;
    bit prev;
    // first rise after reset release
    first = 0;
    while (!d) begin
      @(posedge clk); #1; first++;
    end
    check(first == k / 2, $sformatf("%s first rise after %0d clocks", name, first));
    for (int p = 0; p < 5; p++) begin
      check(r == 1'b1, $sformatf("%s rise pulse at high start", name));
      hi = 0;
      while (d) begin
        @(posedge clk); #1; hi++;
        if (d) check(r == 1'b0, $sformatf("%s rise only once", name));
      end
      lo = 0;
      while (!d) begin
        check(r == 1'b0, $sformatf("%s rise low during low phase", name));
        @(posedge clk); #1; lo++;
      end
      check(hi == k - k / 2, $sformatf("%s high %0d clocks", name, hi));
      check(lo == k / 2, $sformatf("%s low %0d clocks", name, lo));
      check(hi + lo == k, $sformatf("%s period %0d", name, hi + lo));
    end
  endtask

  initial begin
    reset = 1'b1;
    repeat (3) @(posedge clk);
    #1;
    check(da == 1'b0 && db == 1'b0, "outputs low in reset");
    reset = 1'b0;
    fork
      measure(KA, da, ra, "K10");
      measure(KB, db, rb, "K7");
    join
    // reset in the middle holds the output low
    @(posedge clk); #1 reset = 1'b1;
    repeat (2) @(posedge clk);
    #1 check(da == 1'b0 && ra == 1'b0, "reset clears output");
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
