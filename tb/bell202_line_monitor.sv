// bell202_line_monitor: independent checker for the Bell 202 output pins.
//
// Watches the converter's outputs every clock and checks them against the
// Bell 202 rules, without looking inside the design:
//   - the bit clock, mark tone and space tone have periods of K_BAUD,
//     K_MARK and K_SPACE system clocks;
//   - inside the ENABLE window the line carries the mark tone for a serial
//     1 and the space tone for a 0, and outside it the line is low;
//   - each window lasts a whole number of 8-bit packets of 8 * K_BAUD
//     clocks.
// It reads the serial bit in the middle of each bit period, rebuilds each
// byte MSB first and presents it on `byte_out` with a one-clock
// `byte_valid`. It counts windows, mark bits, space bits and phase jumps
// (a bit change that finds the two tones at different levels), and
// reports its own check and failure counts.
module bell202_line_monitor #(
  parameter int unsigned K_BAUD  = 20,
  parameter int unsigned K_MARK  = 20,
  parameter int unsigned K_SPACE = 11
) (
  input  logic       clk,
  input  logic       reset,
  input  logic       out_fsk,
  input  logic       enable,
  input  logic       mark,
  input  logic       space,
  input  logic       out_piso,
  input  logic       clk_piso,
  output logic [7:0] byte_out,
  output logic       byte_valid,
  output int         checks,
  output int         failures,
  output int         windows,
  output int         mark_bits,
  output int         space_bits,
  output int         phase_jumps,
  output int         window_clocks   // length of the last finished window
);

  int   cyc, win_cyc;
  int   last_rise[3];
  logic q_piso, q_mark, q_space, q_bit;
  logic [7:0] shreg;

  initial begin
    checks = 0; failures = 0; windows = 0; mark_bits = 0; space_bits = 0;
    phase_jumps = 0; window_clocks = 0; cyc = 0; win_cyc = 0;
    last_rise = '{-1, -1, -1};
    q_piso = 1'b0; q_mark = 1'b0; q_space = 1'b0; q_bit = 1'b0;
    shreg = '0; byte_out = '0; byte_valid = 1'b0;
  end

  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endfunction

  function automatic void period(input int idx, input logic now, input logic prev,
                                 input int unsigned k, input string name);
    if (now && !prev) begin
      if (last_rise[idx] >= 0)
        check(cyc - last_rise[idx] == int'(k), $sformatf("%s period %0d clocks", name, cyc - last_rise[idx]));
      last_rise[idx] = cyc;
    end
  endfunction

  always @(negedge clk) begin
    byte_valid = 1'b0;
    if (!reset) begin
      cyc++;
      period(0, clk_piso, q_piso, K_BAUD, "bit clock");
      period(1, mark, q_mark, K_MARK, "mark tone");
      period(2, space, q_space, K_SPACE, "space tone");
      if (enable) begin
        check(out_fsk == (out_piso ? mark : space), "line carries mark for 1, space for 0");
        if (win_cyc > 0 && out_piso != q_bit && mark != space) phase_jumps++;
        if (win_cyc % int'(K_BAUD) == int'(K_BAUD / 2)) begin
          shreg = {shreg[6:0], out_piso};
          if (out_piso) mark_bits++;
          else          space_bits++;
        end
        win_cyc++;
        if (win_cyc % int'(8 * K_BAUD) == 0) begin
          byte_out   = shreg;
          byte_valid = 1'b1;
        end
      end else begin
        check(out_fsk == 1'b0, "line low outside the window");
        if (win_cyc != 0) begin
          windows++;
          window_clocks = win_cyc;
          check(win_cyc % int'(8 * K_BAUD) == 0, $sformatf("window of %0d clocks", win_cyc));
          win_cyc = 0;
        end
      end
      q_piso = clk_piso; q_mark = mark; q_space = space; q_bit = out_piso;
    end
  end

endmodule
