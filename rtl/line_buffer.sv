// line_buffer: first-in first-out store for the characters of one line.
//
// A DEPTH-entry memory with a write and a read pointer. `push` writes
// `wr_data` at the tail unless the buffer is full; `pop` advances the head
// unless it is empty. The head character is always on `rd_data` (an
// asynchronous read of the memory), so a consumer reads it and pops in the
// same cycle. `count` is the number of characters held, which is the
// length of the stored string. Pushing and popping in one cycle keeps the
// count. Reset clears both pointers; the memory is not cleared. The depth,
// 64 characters, is this design's choice.
module line_buffer #(
  parameter int unsigned DEPTH = 64,   // power of two
  parameter int unsigned WIDTH = 8
) (
  input  logic                     clk,
  input  logic                     reset,
  input  logic                     push,
  input  logic [WIDTH-1:0]         wr_data,
  input  logic                     pop,
  output logic [WIDTH-1:0]         rd_data,
  output logic                     empty,
  output logic                     full,
  output logic [$clog2(DEPTH):0]   count
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wr_ptr, rd_ptr;   // one extra bit tells full from empty
  logic             do_push, do_pop;

  assign empty   = (wr_ptr == rd_ptr);
  assign full    = (wr_ptr[AW-1:0] == rd_ptr[AW-1:0]) && (wr_ptr[AW] != rd_ptr[AW]);
  assign count   = wr_ptr - rd_ptr;
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;
  assign rd_data = mem[rd_ptr[AW-1:0]];

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
    end else begin
      if (do_push) wr_ptr <= wr_ptr + 1'b1;
      if (do_pop)  rd_ptr <= rd_ptr + 1'b1;
    end
  end

  initial assert (DEPTH >= 2 && (DEPTH & (DEPTH - 1)) == 0)
    else $error("line_buffer: DEPTH must be a power of two");

endmodule
