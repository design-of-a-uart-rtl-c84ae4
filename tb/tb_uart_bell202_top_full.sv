// tb_uart_bell202_top_full: the converter at full rate, all parameters at
// their defaults.
//
// 50 MHz clock, 115200 baud terminal link, 1200 baud Bell 202 line with
// 1200 Hz mark and 2200 Hz space tones. The terminal model types "B" and
// then "BCDE", each ended by a carriage return, as in the bench
// measurements the design is built for. The line monitor checks the tone
// and bit-clock periods (41667, 41667 and 22727 clocks), the gating and
// the modulation every clock, and rebuilds the bytes. The test checks that
// the bytes on the line are 0x42, then 0x42 0x43 0x44 0x45, that each
// ENABLE window lasts 8 bit periods (333336 clocks, 6.67 ms, 150 Hz) and
// that the echo on `tx` repeats what was typed. About 2.2 million clocks.
module tb_uart_bell202_top_full;

  import bell202_pkg::*;

  logic clk = 1'b0;
  logic reset, rx, tx, out_fsk, enable, mark, space, out_piso, clk_piso, sending;
  int   checks = 0;
  int   failures = 0;

  always #10 clk = ~clk;   // 50 MHz

  uart_bell202_top dut (
    .clk_50mhz(clk), .reset, .rx, .tx, .out_fsk_data(out_fsk), .enable, .mark, .space,
    .out_piso, .clk_piso, .sending
  );

  logic [7:0] byte_out;
  logic       byte_valid;
  int         m_checks, m_failures, windows, mark_bits, space_bits, phase_jumps, window_clocks;

  bell202_line_monitor #(.K_BAUD(K_BAUD), .K_MARK(K_MARK), .K_SPACE(K_SPACE)) mon (
    .clk, .reset, .out_fsk, .enable, .mark, .space, .out_piso, .clk_piso,
    .byte_out, .byte_valid, .checks(m_checks), .failures(m_failures), .windows,
    .mark_bits, .space_bits, .phase_jumps, .window_clocks
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  logic [7:0] echo_exp[$];
  logic [7:0] line_exp[$];
  int n_echo = 0, n_bytes = 0;

  task automatic type_char(input logic [7:0] b);
    rx = 1'b0;
    repeat (K_HOST) @(posedge clk);
    for (int i = 0; i < 8; i++) begin
      rx = b[i];
      repeat (K_HOST) @(posedge clk);
    end
    rx = 1'b1;
    repeat (K_HOST) @(posedge clk);
  endtask

  initial begin
    logic [7:0] b;
    @(negedge reset);
    forever begin
      @(negedge tx);
      repeat (K_HOST / 2) @(posedge clk);
      for (int i = 0; i < 8; i++) begin
        repeat (K_HOST) @(posedge clk);
        b[i] = tx;
      end
      repeat (K_HOST) @(posedge clk);
      n_echo++;
      if (echo_exp.size() == 0) check(1'b0, $sformatf("unexpected echo %02h", b));
      else check(b == echo_exp.pop_front(), $sformatf("echo %02h", b));
    end
  end

  always @(posedge clk) if (!reset && byte_valid) begin
    n_bytes++;
    $display("packet %02h (\"%c\") at %0t", byte_out, byte_out, $time);
    if (line_exp.size() == 0) check(1'b0, $sformatf("unexpected packet %02h", byte_out));
    else check(byte_out == line_exp.pop_front(), $sformatf("packet %02h", byte_out));
  end

  task automatic type_line(input string s);
    for (int i = 0; i < s.len(); i++) begin
      echo_exp.push_back(s[i]);
      line_exp.push_back(s[i]);
      type_char(s[i]);
    end
    echo_exp.push_back(ASCII_CR);
    type_char(ASCII_CR);
  endtask

  task automatic wait_sent();
    repeat (100) @(posedge clk);
    while (sending) @(posedge clk);
    while (enable) @(posedge clk);
    repeat (K_BAUD) @(posedge clk);
  endtask

  initial begin
    reset = 1'b1; rx = 1'b1;
    repeat (4) @(posedge clk);
    reset = 1'b0;
    repeat (1000) @(posedge clk);
    type_line("B");
    wait_sent();
    check(windows == 1, $sformatf("%0d windows for B", windows));
    check(window_clocks == int'(8 * K_BAUD), $sformatf("window %0d clocks", window_clocks));
    type_line("BCDE");
    wait_sent();
    check(windows == 5, $sformatf("%0d windows in all", windows));
    check(n_bytes == 5 && line_exp.size() == 0, $sformatf("%0d bytes on the line", n_bytes));
    check(n_echo == 7 && echo_exp.size() == 0, $sformatf("%0d echoes", n_echo));
    check(mark_bits == 12 && space_bits == 28, $sformatf("%0d mark and %0d space bits", mark_bits, space_bits));
    check(phase_jumps > 0, "phase jumps at bit changes");
    $display("windows=%0d mark_bits=%0d space_bits=%0d phase_jumps=%0d", windows, mark_bits, space_bits, phase_jumps);
    checks += m_checks;
    failures += m_failures;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + m_checks, failures + m_failures);
    $finish;
  end

endmodule
