// tb_bell202_transmitter: checks the Bell 202 transmitter end to end.
//
// Scaled dividers (bit clock K = 20, mark K = 20, space K = 11 system
// clocks) keep the ratios of the real design and let the test run
// quickly. A monitor independent of the design checks, every clock, that
// OUT_FSK equals the mark monitor for a serial 1 and the space monitor for
// a 0 inside the ENABLE window and is low outside it. For every window it
// reads OUT_PISO in the middle of each bit period, rebuilds the bytes MSB
// first and compares them with the bytes loaded, and checks that the
// window is a whole number of 8-bit packets, 8 * 20 clocks each. It also
// checks the bit-clock period and the load-to-window latency (at most one
// bit period). Stimulus: "B" alone, "BCDE" with a gap between
// characters, two bytes loaded back to back (one window of 16 bits), and
// random bytes at random phases.
module tb_bell202_transmitter;

  localparam int unsigned KB = 20;
  localparam int unsigned KM = 20;
  localparam int unsigned KS = 11;

  logic       clk = 1'b0;
  logic       reset;
  logic [7:0] data;
  logic       data_load;
  logic       out_fsk, enable, mark_m, space_m, piso_m, clk_piso;
  int         checks = 0;
  int         failures = 0;

  always #10 clk = ~clk;   // 50 MHz

  bell202_transmitter #(.K_BAUD(KB), .K_MARK(KM), .K_SPACE(KS), .N_BITS(8)) dut (
    .clk_50mhz(clk), .reset, .data, .data_load,
    .out_fsk, .enable, .mark_monitor(mark_m), .space_monitor(space_m),
    .out_piso_monitor(piso_m), .clk_piso_monitor(clk_piso)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  logic [7:0] expected[$];
  int         bytes_seen = 0;
  int         long_windows = 0;

  // ---- monitor ----
  int   win_cyc = 0;
  logic [7:0] shreg;
  int   last_piso_rise = -1, cyc = 0;
  logic clk_piso_q = 1'b0;

  always @(negedge clk) if (!reset) begin
    cyc++;
    // modulation and gating
    if (enable) check(out_fsk == (piso_m ? mark_m : space_m), "FSK follows serial bit inside window");
    else        check(out_fsk == 1'b0, "line low outside window");
    // bit clock period
    if (clk_piso && !clk_piso_q) begin
      if (last_piso_rise >= 0) check(cyc - last_piso_rise == KB, "bit clock period");
      last_piso_rise = cyc;
    end
    clk_piso_q = clk_piso;
    // packet decoding
    if (enable) begin
      if (win_cyc % KB == KB / 2) shreg = {shreg[6:0], piso_m};
      win_cyc++;
      if (win_cyc % (8 * KB) == 0) begin
        bytes_seen++;
        if (expected.size() == 0) check(1'b0, "unexpected packet");
        else check(shreg == expected.pop_front(), $sformatf("packet byte %02h", shreg));
      end
    end else if (win_cyc != 0) begin
      check(win_cyc % (8 * KB) == 0, $sformatf("window of %0d clocks", win_cyc));
      if (win_cyc > 8 * KB) long_windows++;
      win_cyc = 0;
    end
  end

  task automatic load_byte(input logic [7:0] b);
    @(negedge clk);
    data = b; data_load = 1'b1;
    expected.push_back(b);
    @(negedge clk);
    data_load = 1'b0; data = $urandom;   // the bus may change after the pulse
  endtask

  // load while idle and measure the latency to the window
  task automatic load_idle(input logic [7:0] b);
    int lat;
    check(!enable, "idle before load");
    load_byte(b);
    lat = 1;
    while (!enable) begin
      @(negedge clk); lat++;
      if (lat > KB + 2) break;
    end
    check(lat <= KB + 1, $sformatf("load-to-window latency %0d clocks", lat));
  endtask

  task automatic wait_idle();
    @(negedge clk);
    while (enable) @(negedge clk);
    repeat (3) @(negedge clk);
  endtask

  initial begin
    reset = 1'b1; data = '0; data_load = 1'b0;
    repeat (4) @(posedge clk);
    #1 reset = 1'b0;
    repeat (50) @(negedge clk);
    check(!enable && !out_fsk, "idle after reset");
    // "B"
    load_idle(8'h42);
    wait_idle();
    // "BCDE", one character per window
    for (int i = 0; i < 4; i++) begin
      load_idle(8'h42 + 8'(i));        // "B", "C", "D", "E"
      wait_idle();
      repeat (KB) @(negedge clk);
    end
    // back to back: second byte loaded while the first is on the line
    load_idle(8'hA5);
    repeat (3 * KB) @(negedge clk);
    load_byte(8'h3C);
    wait_idle();
    check(long_windows == 1, $sformatf("%0d back-to-back windows", long_windows));
    // random bytes at random phases
    for (int n = 0; n < 10; n++) begin
      repeat ($urandom % (2 * KB)) @(negedge clk);
      load_idle(8'($urandom));
      wait_idle();
    end
    check(expected.size() == 0, $sformatf("%0d bytes never sent", expected.size()));
    check(bytes_seen == 17, $sformatf("%0d packets", bytes_seen));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
