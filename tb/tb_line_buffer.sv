// tb_line_buffer: checks the character FIFO.
//
// An 8-entry buffer gets random pushes and pops for many clocks and is
// compared every clock with a queue model: head character, count, empty
// and full. Pushes into a full buffer and pops from an empty one must be
// ignored; the test fills and drains the buffer completely at least once.
module tb_line_buffer;

  localparam int unsigned DEPTH = 8;

  logic       clk = 1'b0;
  logic       reset, push, pop, empty, full;
  logic [7:0] wr_data, rd_data;
  logic [$clog2(DEPTH):0] count;
  logic [7:0] model[$];
  int         checks = 0;
  int         failures = 0;
  int         n_full = 0, n_empty = 0;

  always #5 clk = ~clk;

  line_buffer #(.DEPTH(DEPTH), .WIDTH(8)) dut (
    .clk, .reset, .push, .wr_data, .pop, .rd_data, .empty, .full, .count
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic compare();
    check(count == model.size(), $sformatf("count %0d, model %0d", count, model.size()));
    check(empty == (model.size() == 0), "empty flag");
    check(full == (model.size() == DEPTH), "full flag");
    if (model.size() > 0) check(rd_data == model[0], $sformatf("head %02h", rd_data));
    if (full) n_full++;
    if (empty) n_empty++;
  endtask

  initial begin
    int bias;
    reset = 1'b1; push = 1'b0; pop = 1'b0; wr_data = '0;
    repeat (2) @(posedge clk);
    #1 reset = 1'b0;
    compare();
    for (int n = 0; n < 1500; n++) begin
      bit do_push, do_pop;
      bias = (n / 100) % 2 ? 3 : 7;   // phases that fill, then drain
      push = ($urandom % 10) < bias;
      pop  = ($urandom % 10) < 10 - bias;
      wr_data = 8'($urandom);
      do_push = push && model.size() < DEPTH;
      do_pop  = pop && model.size() > 0;
      @(posedge clk); #1;
      if (do_pop)  void'(model.pop_front());
      if (do_push) model.push_back(wr_data);
      compare();
    end
    check(n_full > 0 && n_empty > 0, "buffer filled and drained");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
