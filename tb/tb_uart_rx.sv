// tb_uart_rx: checks the 8N1 UART receiver.
//
// With 32 clocks per bit, the testbench sends frames on the line: random
// bytes back to back, bytes sent 3 % fast and 3 % slow, a frame with a low
// stop bit (must be dropped with a framing-error pulse) and a short low
// glitch (must be ignored). Each received byte must match, and `valid`
// must come 9 to 10 bit periods after the start edge.
module tb_uart_rx;

  localparam int unsigned CPB = 32;

  logic       clk = 1'b0;
  logic       reset, rxd;
  logic [7:0] data;
  logic       valid, frame_err;
  int         checks = 0;
  int         failures = 0;
  int         cyc = 0, start_cyc = 0, n_valid = 0, n_err = 0;
  logic [7:0] expected[$];

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  uart_rx #(.CLKS_PER_BIT(CPB)) dut (.clk, .reset, .rxd, .data, .valid, .frame_err);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic send(input logic [7:0] b, input int unsigned bit_clks, input bit stop);
    start_cyc = cyc;
    rxd = 1'b0;
    repeat (bit_clks) @(posedge clk);
    for (int i = 0; i < 8; i++) begin
      rxd = b[i];
      repeat (bit_clks) @(posedge clk);
    end
    rxd = stop;
    repeat (bit_clks) @(posedge clk);
    rxd = 1'b1;
  endtask

  always @(posedge clk) if (!reset) begin
    if (valid) begin
      n_valid++;
      if (expected.size() == 0) check(1'b0, "unexpected byte");
      else check(data == expected.pop_front(), $sformatf("received %02h", data));
      check(cyc - start_cyc >= 9 * CPB && cyc - start_cyc <= 10 * CPB + 3,
            $sformatf("valid %0d clocks after start", cyc - start_cyc));
    end
    if (frame_err) n_err++;
  end

  initial begin
    reset = 1'b1; rxd = 1'b1;
    repeat (3) @(posedge clk);
    reset = 1'b0;
    repeat (20) @(posedge clk);
    for (int n = 0; n < 30; n++) begin
      logic [7:0] b = 8'($urandom);
      expected.push_back(b);
      send(b, CPB, 1'b1);
    end
    repeat (2 * CPB) @(posedge clk);
    for (int n = 0; n < 5; n++) begin
      logic [7:0] b = 8'($urandom);
      expected.push_back(b);
      send(b, CPB - 1, 1'b1);
      expected.push_back(~b);
      send(~b, CPB + 1, 1'b1);
    end
    repeat (2 * CPB) @(posedge clk);
    send(8'h55, CPB, 1'b0);            // framing error
    repeat (3 * CPB) @(posedge clk);
    rxd = 1'b0;                        // glitch shorter than half a bit
    repeat (CPB / 4) @(posedge clk);
    rxd = 1'b1;
    repeat (12 * CPB) @(posedge clk);
    expected.push_back(8'h42);
    send(8'h42, CPB, 1'b1);
    repeat (2 * CPB) @(posedge clk);
    check(n_valid == 41, $sformatf("%0d bytes received", n_valid));
    check(n_err == 1, $sformatf("%0d framing errors", n_err));
    check(expected.size() == 0, "all bytes received");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
