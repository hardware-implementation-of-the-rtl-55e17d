// Shared types, constants and functions of the Salsa20 designs.
//
// A Salsa20 block is a 4x4 matrix of 32-bit words, held here as a 512-bit
// vector with word i in bits 32*i+31:32*i. The quarterround is
//   z1 = y1 ^ ((y0 + y3) <<< 7),  z2 = y2 ^ ((z1 + y0) <<< 9),
//   z3 = y3 ^ ((z2 + z1) <<< 13), z0 = y0 ^ ((z3 + z2) <<< 18).
// Ten column rounds alternate with ten row rounds; since a row round is a
// column round applied to the transposed matrix, every design here runs the
// column round and transposes between rounds. The 16-byte-key input matrix
// layout (constants "expand 16-byte k") is the standard Salsa20 one.
package salsa20_pkg;

  typedef logic [31:0] word_t;
  typedef logic [127:0] quad_t;    // y0 in bits 31:0
  typedef logic [511:0] block_t;   // word i in bits 32*i+31:32*i

  localparam int unsigned ROUNDS = 20;

  // "expand 16-byte k" (tau), used with a 128-bit key.
  localparam word_t TAU [4] = '{32'h61707865, 32'h3120646e, 32'h79622d36, 32'h6b206574};

  function automatic word_t rotl(input word_t x, input int unsigned r);
    return (x << r) | (x >> (32 - r));
  endfunction

  function automatic quad_t quarterround(input quad_t y);
    word_t y0, y1, y2, y3, z0, z1, z2, z3;
    {y3, y2, y1, y0} = y;
    z1 = y1 ^ rotl(y0 + y3, 7);
    z2 = y2 ^ rotl(z1 + y0, 9);
    z3 = y3 ^ rotl(z2 + z1, 13);
    z0 = y0 ^ rotl(z3 + z2, 18);
    return {z3, z2, z1, z0};
  endfunction

  // Word index of element e (0..3) of column group c (0..3):
  // column c starts at the diagonal word 5c and walks down the column.
  function automatic int unsigned col_idx(input int unsigned c, input int unsigned e);
    return (5 * c + 4 * e) % 16;
  endfunction

  // Word index of element e of row group r: starts at the diagonal, walks right.
  function automatic int unsigned row_idx(input int unsigned r, input int unsigned e);
    return 4 * r + (r + e) % 4;
  endfunction

  // Group g = 0..3 are the columns, 4..7 the rows.
  function automatic int unsigned grp_idx(input int unsigned g, input int unsigned e);
    return (g < 4) ? col_idx(g, e) : row_idx(g - 4, e);
  endfunction

  function automatic word_t get_word(input block_t b, input int unsigned i);
    return b[32*i +: 32];
  endfunction

  // Four quarterrounds on the four columns (one column round).
  function automatic block_t column_round(input block_t x);
    block_t r;
    r = x;
    for (int unsigned c = 0; c < 4; c++) begin
      quad_t q, z;
      for (int unsigned e = 0; e < 4; e++) q[32*e +: 32] = x[32*col_idx(c, e) +: 32];
      z = quarterround(q);
      for (int unsigned e = 0; e < 4; e++) r[32*col_idx(c, e) +: 32] = z[32*e +: 32];
    end
    return r;
  endfunction

  function automatic block_t transpose(input block_t x);
    block_t r;
    for (int unsigned i = 0; i < 4; i++)
      for (int unsigned j = 0; j < 4; j++)
        r[32*(4*i+j) +: 32] = x[32*(4*j+i) +: 32];
    return r;
  endfunction

  // Word-wise addition of two blocks (the feed-forward at the end).
  function automatic block_t block_add(input block_t a, input block_t b);
    block_t r;
    for (int unsigned i = 0; i < 16; i++) r[32*i +: 32] = a[32*i +: 32] + b[32*i +: 32];
    return r;
  endfunction

  // Input matrix for a 128-bit key, 64-bit nonce and 64-bit block counter.
  function automatic block_t input_matrix(input logic [127:0] key, input logic [63:0] nonce,
                                          input logic [63:0] ctr);
    block_t m;
    m[32*0 +: 32]  = TAU[0];
    m[32*1 +: 128] = key;
    m[32*5 +: 32]  = TAU[1];
    m[32*6 +: 64]  = nonce;
    m[32*8 +: 64]  = ctr;
    m[32*10 +: 32] = TAU[2];
    m[32*11 +: 128] = key;
    m[32*15 +: 32] = TAU[3];
    return m;
  endfunction

endpackage
