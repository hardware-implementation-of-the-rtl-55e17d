// Reference model of the Phelix keystream generator for the testbenches,
// written directly from the cipher's equations as whole-array functions.
package phelix_ref_pkg;

  typedef logic [31:0] w32;
  typedef w32 st5 [5];

  function automatic w32 rl(w32 x, int r);
    return (x << r) | (x >> (32 - r));
  endfunction

  function automatic st5 H(st5 z, w32 k0, w32 k1);
    z[0] += z[3] ^ k0;   z[3] = rl(z[3], 15);
    z[1] += z[4];        z[4] = rl(z[4], 25);
    z[2] ^= z[0];        z[0] = rl(z[0], 9);
    z[3] ^= z[1];        z[1] = rl(z[1], 10);
    z[4] += z[2];        z[2] = rl(z[2], 17);
    z[0] ^= z[3] + k1;   z[3] = rl(z[3], 30);
    z[1] ^= z[4];        z[4] = rl(z[4], 13);
    z[2] += z[0];        z[0] = rl(z[0], 20);
    z[3] += z[1];        z[1] = rl(z[1], 11);
    z[4] ^= z[2];        z[2] = rl(z[2], 5);
    return z;
  endfunction

  function automatic logic [159:0] pack5(st5 z);
    return {z[4], z[3], z[2], z[1], z[0]};
  endfunction

  function automatic st5 unpack5(logic [159:0] v);
    st5 z;
    for (int i = 0; i < 5; i++) z[i] = v[32*i +: 32];
    return z;
  endfunction

  // Working key K0..K7 from the padded key u (K32..K39) and its byte length.
  function automatic logic [255:0] key_mix(logic [255:0] u, int len);
    w32 K [40];
    logic [255:0] r;
    for (int i = 0; i < 8; i++) K[32+i] = u[32*i +: 32];
    for (int k = 7; k >= 0; k--) begin
      st5 t;
      for (int j = 0; j < 4; j++) t[j] = K[4*k+4+j];
      t[4] = w32'(len + 64);
      t = H(t, 0, 0);
      for (int j = 0; j < 4; j++) K[4*k+j] = t[j] ^ K[4*k+8+j];
    end
    for (int i = 0; i < 8; i++) r[32*i +: 32] = K[i];
    return r;
  endfunction

  function automatic logic [255:0] n_expand(logic [127:0] n);
    logic [255:0] r;
    for (int i = 0; i < 4; i++) begin
      r[32*i +: 32] = n[32*i +: 32];
      r[32*(i+4) +: 32] = w32'(i) - n[32*i +: 32];
    end
    return r;
  endfunction

  function automatic void subkeys(logic [255:0] K, logic [255:0] N, int len, longint i,
                                  output w32 x0, output w32 x1);
    w32 xp;
    int m;
    m = int'(i & 7);
    case (m % 4)
      1: xp = w32'(4 * len);
      3: xp = w32'(i >>> 31);
      default: xp = 0;
    endcase
    x0 = K[32*m +: 32];
    x1 = K[32*((m+4)%8) +: 32] + N[32*m +: 32] + xp + w32'(i) + 8;
  endfunction

  // Keystream words for plaintext words pt[0..n-1] (blocks 0..n-1).
  function automatic void keystream(logic [255:0] key, int len, logic [127:0] nonce,
                                    w32 pt [$], output w32 ks [$]);
    logic [255:0] K, N;
    st5 z, y;
    w32 old [$];
    K = key_mix(key, len);
    N = n_expand(nonce);
    for (int j = 0; j < 4; j++) z[j] = K[32*(j+3) +: 32] ^ N[32*j +: 32];
    z[4] = K[32*7 +: 32];
    old = '{0, 0, 0, 0};
    ks = {};
    for (longint i = -8; i < longint'(pt.size()); i++) begin
      w32 x0, x1, p, s;
      int ii;
      ii = int'(i);
      p = 0;
      if (i >= 0) p = pt[ii];
      subkeys(K, N, len, i, x0, x1);
      old.push_back(z[4]);
      y = H(z, 0, x0);
      s = y[4] + old.pop_front();
      if (i >= 0) ks.push_back(s);
      z = H(y, p, x1);
    end
  endfunction

endpackage
