// FIFO of old Phelix state words (first in, first out).
//
// Holds the last DEPTH (4) words w4 that entered a block; the output adder
// adds the oldest one to the new keystream value. push and pop may happen
// in the same cycle (the usual case: pop the oldest word, append the new
// one). A push to a full FIFO without a pop is ignored, as is a pop from an
// empty one; reset empties it. dout shows the oldest entry. The document
// gives the FIFO and its depth; the circular-buffer build is this design's.
module phelix_fifo
  import phelix_pkg::*;
#(
  parameter int unsigned DEPTH = OLD_WORDS
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   push,
  input  logic                   pop,
  input  word_t                  din,
  output word_t                  dout,
  output logic [$clog2(DEPTH):0] count
);

  localparam int unsigned AW = $clog2(DEPTH);

  word_t         mem [DEPTH];
  logic [AW-1:0] rd, wr;
  logic          do_push, do_pop;

  assign do_pop  = pop && (count != 0);
  assign do_push = push && (count != (AW+1)'(DEPTH) || do_pop);
  assign dout    = mem[rd];

  always_ff @(posedge clk) begin
    if (rst) begin
      rd    <= '0;
      wr    <= '0;
      count <= '0;
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else begin
      if (do_push) begin
        mem[wr] <= din;
        wr <= (wr == AW'(DEPTH - 1)) ? '0 : wr + 1'b1;
      end
      if (do_pop) rd <= (rd == AW'(DEPTH - 1)) ? '0 : rd + 1'b1;
      count <= count + (AW+1)'(do_push) - (AW+1)'(do_pop);
    end
  end

  initial assert (DEPTH == 2 ** AW) else $error("DEPTH must be a power of two");

endmodule
