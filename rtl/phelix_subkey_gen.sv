// Phelix subkey generator: the two subkey words of block i.
//
//   X_i,0 = K_(i mod 8)
//   X_i,1 = K_((i+4) mod 8) + N_(i mod 8) + X'_i + i + 8   (mod 2^32)
//   X'_i  = 4*len(U) if i mod 4 = 1, floor(i / 2^31) if i mod 4 = 3, else 0
// with i the signed 64-bit block number (ihigh32:ilow32), K the working key
// and N the working nonce. The formulas are the Phelix specification's; the
// document names the block and its inputs (k, n, lu4, ihigh32, ilow32) and
// says two subkey words are made on the fly for each block. x0 and x1 are
// registered when start is high and held until the next start.
module phelix_subkey_gen
  import phelix_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  start,
  input  key_t  k,
  input  key_t  n,
  input  word_t lu4,
  input  word_t ihigh32,
  input  word_t ilow32,
  output word_t x0,
  output word_t x1
);

  logic [2:0] i8;
  word_t      xp;
  assign i8 = ilow32[2:0];

  always_comb begin
    unique case (i8[1:0])
      2'd1:    xp = lu4;
      2'd3:    xp = {ihigh32[30:0], ilow32[31]};  // bits 62:31 of i
      default: xp = '0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      x0 <= '0;
      x1 <= '0;
    end else if (start) begin
      x0 <= k[32*i8 +: 32];
      x1 <= k[32*(3'(i8 + 3'd4)) +: 32] + n[32*i8 +: 32] + xp + ilow32 + 32'd8;
    end
  end

endmodule
