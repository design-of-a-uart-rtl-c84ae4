// tb_data_logger: checks the UART data logger.
//
// Scaled timing: 16 clocks per UART bit, 300 clocks between loads and an
// 8-character buffer. The testbench types lines on `rxd` as a terminal
// would and checks:
//   - every character of a line, terminator included, is echoed on `txd`
//     (decoded by an independent line decoder);
//   - after the terminator the characters come out on `data`, in order,
//     each with a one-clock `data_load` pulse, pulses exactly 300 clocks
//     apart, the first as soon as the terminator's stop bit is sampled;
//   - a line with no characters sends nothing;
//   - characters typed while a line is being sent are neither echoed nor
//     sent;
//   - characters beyond the buffer depth are dropped.
module tb_data_logger;

  localparam int unsigned CPB   = 16;
  localparam int unsigned WAITC = 300;
  localparam int unsigned DEPTH = 8;

  logic       clk = 1'b0;
  logic       reset_n, rxd, txd, data_load, sending;
  logic [7:0] data;
  int         checks = 0;
  int         failures = 0;
  int         cyc = 0;
  logic [7:0] echo_exp[$];
  logic [7:0] load_exp[$];
  int         n_echo = 0, n_load = 0, last_load = -1, term_cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  data_logger #(.CLKS_PER_BIT(CPB), .PACKET_WAIT(WAITC), .DEPTH(DEPTH)) dut (
    .clk, .reset_n, .rxd, .txd, .data, .data_load, .sending
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // terminal side: send one character
  task automatic type_char(input logic [7:0] b);
    rxd = 1'b0;
    repeat (CPB) @(posedge clk);
    for (int i = 0; i < 8; i++) begin
      rxd = b[i];
      repeat (CPB) @(posedge clk);
    end
    rxd = 1'b1;
    repeat (CPB) @(posedge clk);
  endtask

  // echo decoder
  initial begin
    logic [7:0] b;
    @(posedge reset_n);
    forever begin
      @(negedge txd);
      repeat (CPB / 2) @(posedge clk);
      for (int i = 0; i < 8; i++) begin
        repeat (CPB) @(posedge clk);
        b[i] = txd;
      end
      repeat (CPB) @(posedge clk);
      check(txd == 1'b1, "echo stop bit");
      n_echo++;
      if (echo_exp.size() == 0) check(1'b0, $sformatf("unexpected echo %02h", b));
      else check(b == echo_exp.pop_front(), $sformatf("echo %02h", b));
    end
  end

  // load monitor
  always @(negedge clk) if (reset_n && data_load) begin
    n_load++;
    if (load_exp.size() == 0) check(1'b0, $sformatf("unexpected load %02h", data));
    else check(data == load_exp.pop_front(), $sformatf("load %02h", data));
    if (last_load >= 0) check(cyc - last_load == WAITC, $sformatf("loads %0d clocks apart", cyc - last_load));
    else check(cyc - term_cyc >= 9 * CPB && cyc - term_cyc <= 10 * CPB,
               $sformatf("first load %0d clocks after the terminator starts", cyc - term_cyc));
    check(sending, "sending flag during a line");
    last_load = cyc;
    @(negedge clk);
    check(!data_load, "load pulse is one clock long");
  end

  task automatic type_line(input string s, input int unsigned expect_sent);
    for (int i = 0; i < s.len(); i++) begin
      echo_exp.push_back(s[i]);
      if (i < int'(expect_sent)) load_exp.push_back(s[i]);
      type_char(s[i]);
    end
    echo_exp.push_back(8'h0D);
    last_load = -1;
    term_cyc = cyc;                   // start bit of the terminator
    type_char(8'h0D);
  endtask

  task automatic wait_sent();
    repeat (3 * CPB) @(posedge clk);
    while (sending) @(posedge clk);
    repeat (12 * CPB) @(posedge clk);
  endtask

  initial begin
    reset_n = 1'b0; rxd = 1'b1;
    repeat (3) @(posedge clk);
    reset_n = 1'b1;
    repeat (10) @(posedge clk);
    check(!sending && !data_load && txd, "idle after reset");
    type_line("", 0);                 // empty line
    wait_sent();
    check(n_load == 0, "empty line sends nothing");
    type_line("BCDE", 4);
    repeat (WAITC / 2) @(posedge clk);
    check(sending, "sending after the line");
    type_char("X");                   // typed while sending: dropped
    type_char("Y");
    wait_sent();
    check(n_load == 4, $sformatf("%0d loads for BCDE", n_load));
    type_line("0123456789", DEPTH);   // two characters too many
    wait_sent();
    type_line("B", 1);
    wait_sent();
    check(n_load == 4 + DEPTH + 1, $sformatf("%0d loads in all", n_load));
    check(load_exp.size() == 0 && echo_exp.size() == 0, "nothing left unsent");
    check(n_echo == 1 + 5 + 11 + 2, $sformatf("%0d echoes", n_echo));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
