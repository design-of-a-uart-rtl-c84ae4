// tb_uart_tx: checks the 8N1 UART transmitter.
//
// With 16 clocks per bit, random bytes are started whenever the
// transmitter is ready, sometimes back to back. An independent line
// decoder samples the middle of each bit, checks the start and stop bits
// and rebuilds the byte. `ready` must stay low for exactly 10 bit periods
// after a start, a start while busy must be ignored, and the line must
// idle high.
module tb_uart_tx;

  localparam int unsigned CPB = 16;

  logic       clk = 1'b0;
  logic       reset, start, txd, ready;
  logic [7:0] data;
  int         checks = 0;
  int         failures = 0;
  logic [7:0] expected[$];
  int         n_rx = 0;

  always #5 clk = ~clk;

  uart_tx #(.CLKS_PER_BIT(CPB)) dut (.clk, .reset, .data, .start, .txd, .ready);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // line decoder
  initial begin
    logic [7:0] b;
    @(negedge reset);
    forever begin
      @(negedge txd);
      repeat (CPB / 2) @(posedge clk);
      check(txd == 1'b0, "start bit");
      for (int i = 0; i < 8; i++) begin
        repeat (CPB) @(posedge clk);
        b[i] = txd;
      end
      repeat (CPB) @(posedge clk);
      check(txd == 1'b1, "stop bit");
      n_rx++;
      if (expected.size() == 0) check(1'b0, "unexpected frame");
      else check(b == expected.pop_front(), $sformatf("frame %02h", b));
    end
  end

  task automatic send(input logic [7:0] b);
    int busy;
    @(negedge clk);
    while (!ready) @(negedge clk);
    data = b; start = 1'b1;
    expected.push_back(b);
    @(negedge clk);
    start = 1'b0;
    data = ~b;                 // a start while busy must be ignored
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    busy = 2;
    while (!ready) begin
      @(negedge clk); busy++;
    end
    check(busy == 10 * CPB, $sformatf("busy for %0d clocks", busy));
  endtask

  initial begin
    reset = 1'b1; start = 1'b0; data = '0;
    repeat (3) @(posedge clk);
    #1 reset = 1'b0;
    repeat (5) @(posedge clk);
    check(txd == 1'b1 && ready, "idle high and ready");
    send(8'h42);
    for (int n = 0; n < 20; n++) begin
      if ($urandom % 2) repeat ($urandom % (3 * CPB)) @(posedge clk);
      send(8'($urandom));
    end
    repeat (2 * CPB) @(posedge clk);
    check(n_rx == 21, $sformatf("%0d frames decoded", n_rx));
    check(txd == 1'b1, "line idles high");
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
