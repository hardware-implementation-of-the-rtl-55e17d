// Reference model of the Salsa20 core for the testbenches, written from the
// cipher's definition with explicit column and row index tables (no
// transposes), so that it shares no structure with the RTL.
package salsa20_ref_pkg;

  typedef logic [31:0] w32;

  function automatic w32 rl(w32 x, int r);
    return (x << r) | (x >> (32 - r));
  endfunction

  function automatic void qr(ref w32 a, ref w32 b, ref w32 c, ref w32 d);
    b = b ^ rl(a + d, 7);
    c = c ^ rl(b + a, 9);
    d = d ^ rl(c + b, 13);
    a = a ^ rl(d + c, 18);
  endfunction

  localparam int COL [4][4] = '{'{0, 4, 8, 12}, '{5, 9, 13, 1}, '{10, 14, 2, 6}, '{15, 3, 7, 11}};
  localparam int ROW [4][4] = '{'{0, 1, 2, 3}, '{5, 6, 7, 4}, '{10, 11, 8, 9}, '{15, 12, 13, 14}};

  function automatic void apply(ref w32 x [16], input int idx [4]);
    w32 a, b, c, d;
    a = x[idx[0]]; b = x[idx[1]]; c = x[idx[2]]; d = x[idx[3]];
    qr(a, b, c, d);
    x[idx[0]] = a; x[idx[1]] = b; x[idx[2]] = c; x[idx[3]] = d;
  endfunction

  // Salsa20 hash of a 512-bit block (word i in bits 32i+31:32i).
  function automatic logic [511:0] hash(logic [511:0] in);
    w32 x [16];
    logic [511:0] out;
    for (int i = 0; i < 16; i++) x[i] = in[32*i +: 32];
    for (int r = 0; r < 10; r++) begin
      for (int c = 0; c < 4; c++) apply(x, COL[c]);
      for (int c = 0; c < 4; c++) apply(x, ROW[c]);
    end
    for (int i = 0; i < 16; i++) out[32*i +: 32] = x[i] + in[32*i +: 32];
    return out;
  endfunction

  function automatic logic [127:0] quarter(logic [127:0] y);
    w32 a, b, c, d;
    {d, c, b, a} = y;
    qr(a, b, c, d);
    return {d, c, b, a};
  endfunction

  // Input matrix for a 128-bit key ("expand 16-byte k").
  function automatic logic [511:0] matrix(logic [127:0] k, logic [63:0] n, logic [63:0] ctr);
    w32 x [16];
    logic [511:0] m;
    x[0] = 32'h61707865; x[5] = 32'h3120646e; x[10] = 32'h79622d36; x[15] = 32'h6b206574;
    for (int i = 0; i < 4; i++) begin x[1+i] = k[32*i +: 32]; x[11+i] = k[32*i +: 32]; end
    x[6] = n[31:0]; x[7] = n[63:32]; x[8] = ctr[31:0]; x[9] = ctr[63:32];
    for (int i = 0; i < 16; i++) m[32*i +: 32] = x[i];
    return m;
  endfunction

  function automatic logic [511:0] rand_block();
    logic [511:0] b;
    for (int i = 0; i < 16; i++) b[32*i +: 32] = $urandom;
    return b;
  endfunction

  // Known answer (computed independently from the definition): the block
  // whose bytes are 0, 1, ..., 63 hashes to this value.
  function automatic logic [511:0] kat_in();
    logic [511:0] b;
    for (int i = 0; i < 64; i++) b[8*i +: 8] = 8'(i);
    return b;
  endfunction
  localparam logic [511:0] KAT_OUT = {
    32'hd4449a81, 32'h0cf4c929, 32'h891e9c61, 32'hd51f3aa4, 32'h58a7e8e2, 32'haa936206,
    32'hf77bd30a, 32'h09629f3c, 32'h8501c8c8, 32'hefb9e8d0, 32'h39678c03, 32'h2238b9fb,
    32'h5d4b28db, 32'hebf397b8, 32'h1eba153c, 32'h321d563c};

endpackage
