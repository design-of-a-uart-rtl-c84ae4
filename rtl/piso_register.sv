// piso_register: parallel-in, serial-out shift register.
//
// A chain of D flip-flops, each fed by a 2-to-1 multiplexer that picks
// either the parallel input bit (load) or the neighbouring flip-flop
// (shift). The serial output is the most significant stage, so a byte
// leaves MSB first, as on the analyser traces of the design description
// (character "B" = 01000010 appears as 0,1,0,0,0,0,1,0). Zeros are shifted
// in behind the data.
//
// The register acts only in clock cycles where `shift_en` is high, which
// is the bit-clock rising edge from the bit-rate divider. In such a cycle
// `load` selects the parallel word, otherwise the contents move one place
// towards the output. `sout` is valid from the cycle after the enabled
// edge. Reset (synchronous, active high) clears all stages.
module piso_register #(
  parameter int unsigned WIDTH = bell202_pkg::DATA_BITS
) (
  input  logic             clk,
  input  logic             reset,
  input  logic             shift_en,  // bit-clock edge
  input  logic             load,      // 1: parallel load, 0: shift
  input  logic [WIDTH-1:0] pdata,
  output logic             sout
);

  logic [WIDTH-1:0] stage;
  logic [WIDTH-1:0] stage_d;

  // the multiplexer in front of every flip-flop
  always_comb begin
    for (int i = 0; i < int'(WIDTH); i++) begin
      if (load)       stage_d[i] = pdata[i];
      else if (i > 0) stage_d[i] = stage[i-1];
      else            stage_d[i] = 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (reset)         stage <= '0;
    else if (shift_en) stage <= stage_d;
  end

  assign sout = stage[WIDTH-1];

endmodule
