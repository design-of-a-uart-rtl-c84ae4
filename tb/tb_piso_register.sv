// tb_piso_register: checks the 8-bit parallel-in serial-out register.
//
// Bytes ("B" = 0x42 first, then random ones) are loaded on an enabled edge
// and shifted out on the following enabled edges, which come every third
// clock. The serial output must give the byte MSB first, one bit per
// enabled edge, must not move between enabled edges, and must show zeros
// once the byte is out. A load while a byte is half out must replace it.
module tb_piso_register;

  logic       clk = 1'b0;
  logic       reset;
  logic       shift_en, load;
  logic [7:0] pdata;
  logic       sout;
  int         checks = 0;
  int         failures = 0;

  always #5 clk = ~clk;

  piso_register #(.WIDTH(8)) dut (.clk, .reset, .shift_en, .load, .pdata, .sout);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // one enabled edge, with the idle clocks between edges
  task automatic edge_step(input bit ld, input logic [7:0] d);
    load = ld; pdata = d; shift_en = 1'b1;
    @(posedge clk); #1;
    load = 1'b0; shift_en = 1'b0; pdata = $urandom;
  endtask

  task automatic send(input logic [7:0] b, input int nbits);
    logic held;
    edge_step(1'b1, b);
    for (int i = 7; i >= 8 - nbits; i--) begin
      check(sout == b[i], $sformatf("byte %02h bit %0d", b, i));
      held = sout;
      repeat (2) begin
        @(posedge clk); #1;
        check(sout == held, "holds between enabled edges");
      end
      if (i > 8 - nbits) edge_step(1'b0, '0);
    end
  endtask

  initial begin
    reset = 1'b1; shift_en = 1'b0; load = 1'b0; pdata = '0;
    repeat (2) @(posedge clk);
    #1 reset = 1'b0;
    check(sout == 1'b0, "empty after reset");
    send(8'h42, 8);
    for (int k = 0; k < 3; k++) begin
      edge_step(1'b0, '0);
      check(sout == 1'b0, "zeros after the byte");
    end
    for (int n = 0; n < 20; n++) send(8'($urandom), 8);
    send(8'hFF, 3);          // interrupted by a new load
    send(8'h5A, 8);
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
