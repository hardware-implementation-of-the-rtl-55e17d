// Shared types and constants of the compact Phelix core.
//
// The Phelix state is five 32-bit words w0..w4, held as a 160-bit vector
// with w0 in bits 31:0. Key and working nonce are eight words each (256
// bits, word 0 in bits 31:0).
package phelix_pkg;

  typedef logic [31:0]  word_t;
  typedef logic [159:0] pstate_t;
  typedef logic [255:0] key_t;

  localparam int unsigned INIT_BLOCKS = 8;  // blocks -8..-1, keystream discarded
  localparam int unsigned OLD_WORDS   = 4;  // old state words kept for the output

  function automatic word_t rotl(input word_t x, input int unsigned r);
    return (x << r) | (x >> (32 - r));
  endfunction

  function automatic word_t get8(input key_t v, input int unsigned i);
    return v[32*(i % 8) +: 32];
  endfunction

endpackage
