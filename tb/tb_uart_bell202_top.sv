// tb_uart_bell202_top: end-to-end test of the UART-to-Bell202 converter.
//
// Scaled timing keeps the run short while keeping the structure: 16 clocks
// per UART bit, a 40-clock Bell 202 bit (mark K = 40, space K = 22, the
// 1200/2200 ratio), loads 10 bit periods apart and an 8-character line
// buffer. A terminal model types lines on `rx` and decodes the echo on
// `tx`; the line monitor checks the tones, the window and the serial data
// on the output pins and rebuilds the bytes sent.
//
// Mechanisms exercised and counted (each must happen at least once):
// echo of typed characters, an empty line that sends nothing, packets in
// an ENABLE window, mark bits, space bits, phase jumps at bit changes,
// characters dropped while a line is being sent, and characters dropped
// when the buffer is full. The bytes on the line must be the typed
// characters in order, and packets must start 10 bit periods apart.
module tb_uart_bell202_top;

  localparam int unsigned KH    = 16;
  localparam int unsigned KB    = 40;
  localparam int unsigned KM    = 40;
  localparam int unsigned KS    = 22;
  localparam int unsigned WAITC = 10 * KB;
  localparam int unsigned DEPTH = 8;

  logic clk = 1'b0;
  logic reset, rx, tx, out_fsk, enable, mark, space, out_piso, clk_piso, sending;
  int   checks = 0;
  int   failures = 0;
  int   cyc = 0;

  always #10 clk = ~clk;
  always @(posedge clk) cyc++;

  uart_bell202_top #(
    .K_HOST(KH), .K_BAUD(KB), .K_MARK(KM), .K_SPACE(KS), .PACKET_WAIT(WAITC), .DEPTH(DEPTH)
  ) dut (
    .clk_50mhz(clk), .reset, .rx, .tx, .out_fsk_data(out_fsk), .enable, .mark, .space,
    .out_piso, .clk_piso, .sending
  );

  logic [7:0] byte_out;
  logic       byte_valid;
  int         m_checks, m_failures, windows, mark_bits, space_bits, phase_jumps, window_clocks;

  bell202_line_monitor #(.K_BAUD(KB), .K_MARK(KM), .K_SPACE(KS)) mon (
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
  int n_echo = 0, n_bytes = 0, n_empty_lines = 0, n_drop_busy = 0, n_drop_full = 0;
  int last_start = -1;
  logic enable_q = 1'b0;

  task automatic type_char(input logic [7:0] b);
    rx = 1'b0;
    repeat (KH) @(posedge clk);
    for (int i = 0; i < 8; i++) begin
      rx = b[i];
      repeat (KH) @(posedge clk);
    end
    rx = 1'b1;
    repeat (KH) @(posedge clk);
  endtask

  // echo decoder
  initial begin
    logic [7:0] b;
    @(negedge reset);
    forever begin
      @(negedge tx);
      repeat (KH / 2) @(posedge clk);
      for (int i = 0; i < 8; i++) begin
        repeat (KH) @(posedge clk);
        b[i] = tx;
      end
      repeat (KH) @(posedge clk);
      n_echo++;
      if (echo_exp.size() == 0) check(1'b0, $sformatf("unexpected echo %02h", b));
      else check(b == echo_exp.pop_front(), $sformatf("echo %02h", b));
    end
  end

  // bytes on the line, and packet spacing
  always @(posedge clk) if (!reset) begin
    if (byte_valid) begin
      n_bytes++;
      if (line_exp.size() == 0) check(1'b0, $sformatf("unexpected packet %02h", byte_out));
      else check(byte_out == line_exp.pop_front(), $sformatf("packet %02h", byte_out));
    end
    if (enable && !enable_q) begin
      if (last_start >= 0 && sending)
        check(cyc - last_start == int'(WAITC), $sformatf("packets %0d clocks apart", cyc - last_start));
      last_start = cyc;
    end
    enable_q <= enable;
  end

  task automatic type_line(input string s, input int unsigned keep);
    for (int i = 0; i < s.len(); i++) begin
      echo_exp.push_back(s[i]);
      if (i < int'(keep)) line_exp.push_back(s[i]);
      else n_drop_full++;
      type_char(s[i]);
    end
    if (s.len() == 0) n_empty_lines++;
    echo_exp.push_back(8'h0D);
    last_start = -1;
    type_char(8'h0D);
  endtask

  task automatic wait_sent();
    repeat (3 * KH) @(posedge clk);
    while (sending) @(posedge clk);
    while (enable) @(posedge clk);
    repeat (12 * KH) @(posedge clk);
  endtask

  initial begin
    int w;
    reset = 1'b1; rx = 1'b1;
    repeat (4) @(posedge clk);
    reset = 1'b0;
    repeat (100) @(posedge clk);
    check(!enable && !out_fsk && tx, "idle after reset");
    type_line("", 0);
    wait_sent();
    check(windows == 0, "an empty line sends nothing");
    type_line("BCDE", 4);
    repeat (WAITC) @(posedge clk);
    type_char("X");                       // typed while sending
    n_drop_busy++;
    wait_sent();
    check(windows == 4, $sformatf("%0d windows for BCDE", windows));
    check(window_clocks == int'(8 * KB), $sformatf("window %0d clocks", window_clocks));
    type_line("0123456789", DEPTH);
    wait_sent();
    w = windows;
    type_line("B", 1);
    wait_sent();
    check(windows == w + 1, "single character line");
    check(line_exp.size() == 0 && echo_exp.size() == 0, "everything sent and echoed");
    check(n_bytes == 4 + DEPTH + 1, $sformatf("%0d bytes on the line", n_bytes));
    // every mechanism happened
    check(n_echo > 0,        $sformatf("echoes: %0d", n_echo));
    check(n_empty_lines > 0, $sformatf("empty lines: %0d", n_empty_lines));
    check(windows > 0,       $sformatf("windows: %0d", windows));
    check(mark_bits > 0,     $sformatf("mark bits: %0d", mark_bits));
    check(space_bits > 0,    $sformatf("space bits: %0d", space_bits));
    check(phase_jumps > 0,   $sformatf("phase jumps: %0d", phase_jumps));
    check(n_drop_busy > 0,   $sformatf("dropped while sending: %0d", n_drop_busy));
    check(n_drop_full > 0,   $sformatf("dropped when full: %0d", n_drop_full));
    $display("mechanisms: echoes=%0d empty_lines=%0d windows=%0d mark_bits=%0d space_bits=%0d phase_jumps=%0d dropped_busy=%0d dropped_full=%0d",
             n_echo, n_empty_lines, windows, mark_bits, space_bits, phase_jumps, n_drop_busy, n_drop_full);
    checks += m_checks;
    failures += m_failures;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + m_checks, failures + m_failures);
    $finish;
  end

endmodule
