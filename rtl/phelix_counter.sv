// Phelix block counter i: a 64-bit two's-complement counter cleared to -8,
// so that the eight initialisation blocks are -8..-1 and keystream blocks
// start at 0. clear has priority over inc. The document draws the counter
// and feeds its two halves to the subkey generator; the width and the
// clear value follow the Phelix block numbering.
module phelix_counter (
  input  logic        clk,
  input  logic        clear,
  input  logic        inc,
  output logic [63:0] q
);

  always_ff @(posedge clk) begin
    if (clear) q <= -64'sd8;
    else if (inc) q <= q + 64'd1;
  end

endmodule
