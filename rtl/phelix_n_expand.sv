// Phelix nonce expansion: 128-bit nonce to the 256-bit working nonce.
//
// The four nonce words N0..N3 are kept and four more are derived as
// N_j = (j mod 4) - N_(j-4) (mod 2^32) for j = 4..7, the Phelix
// specification's rule; the document only states the widths (n_in(127:0)
// to n(255:0)). The result is registered when start is high and held.
module phelix_n_expand
  import phelix_pkg::*;
(
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  input  logic [127:0] n_in,
  output key_t         n
);

  always_ff @(posedge clk) begin
    if (rst) begin
      n <= '0;
    end else if (start) begin
      for (int j = 0; j < 4; j++) begin
        n[32*j +: 32]     <= n_in[32*j +: 32];
        n[32*(j+4) +: 32] <= word_t'(j) - n_in[32*j +: 32];
      end
    end
  end

endmodule
