// tb_ref_pkg: reference models for the testbenches, written independently of the RTL.
// AES-128 per FIPS-197 (S-box by searching for the inverse, then the affine map written as
// rotations), garbling of plain bits with a 32-bit garbling key, and random valid keys.
package tb_ref_pkg;

  function automatic logic [7:0] r_mul(logic [7:0] a, logic [7:0] b);
    logic [7:0] p = 0;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= a;
      a = a[7] ? ((a << 1) ^ 8'h1b) : (a << 1);
    end
    return p;
  endfunction

  function automatic logic [7:0] rotl8(logic [7:0] x, int n);
    return (x << n) | (x >> (8 - n));
  endfunction

  function automatic logic [7:0] r_sbox(logic [7:0] a);
    logic [7:0] inv = 0;
    for (int y = 1; y < 256; y++)
      if (r_mul(a, 8'(y)) == 8'h01) inv = 8'(y);
    return inv ^ rotl8(inv, 1) ^ rotl8(inv, 2) ^ rotl8(inv, 3) ^ rotl8(inv, 4) ^ 8'h63;
  endfunction

  function automatic logic [31:0] r_mixcol(logic [31:0] c);
    logic [7:0] a0, a1, a2, a3;
    {a0, a1, a2, a3} = c;
    return {r_mul(a0,2) ^ r_mul(a1,3) ^ a2 ^ a3,
            a0 ^ r_mul(a1,2) ^ r_mul(a2,3) ^ a3,
            a0 ^ a1 ^ r_mul(a2,2) ^ r_mul(a3,3),
            r_mul(a0,3) ^ a1 ^ a2 ^ r_mul(a3,2)};
  endfunction

  // Round key r+1 from round key r; rcon of round r+1.
  function automatic logic [127:0] r_next_key(logic [127:0] k, logic [7:0] rc);
    logic [31:0] w0, w1, w2, w3, t;
    {w0, w1, w2, w3} = k;
    t = {r_sbox(w3[23:16]) ^ rc, r_sbox(w3[15:8]), r_sbox(w3[7:0]), r_sbox(w3[31:24])};
    w0 ^= t; w1 ^= w0; w2 ^= w1; w3 ^= w2;
    return {w0, w1, w2, w3};
  endfunction

  function automatic logic [127:0] r_round_key(logic [127:0] k, int r);
    logic [7:0] rc = 8'h01;
    for (int i = 0; i < r; i++) begin
      k  = r_next_key(k, rc);
      rc = r_mul(rc, 8'h02);
    end
    return k;
  endfunction

  function automatic logic [7:0] r_byte(logic [127:0] s, int i);
    return s[127-8*i -: 8];
  endfunction

  // AES-128 encryption; with nr < 10 it returns the state after round nr.
  function automatic logic [127:0] r_encrypt(logic [127:0] pt, logic [127:0] key, int nr = 10);
    logic [127:0] s, t;
    logic [7:0] rc = 8'h01;
    s = pt ^ key;
    for (int r = 1; r <= nr; r++) begin
      // sub bytes + shift rows
      for (int c = 0; c < 4; c++)
        for (int w = 0; w < 4; w++)
          t[127-8*(4*c+w) -: 8] = r_sbox(r_byte(s, 4*((c+w)%4)+w));
      if (r != 10)
        for (int c = 0; c < 4; c++) t[127-32*c -: 32] = r_mixcol(t[127-32*c -: 32]);
      key = r_next_key(key, rc);
      rc  = r_mul(rc, 8'h02);
      s   = t ^ key;
    end
    return s;
  endfunction

  // Garbling key: k1 = gk[31:24], k2 = gk[23:16], k3 = gk[15:8], k4 = gk[7:0].
  function automatic logic [7:0] r_lbl(logic [31:0] gk, bit red, logic v);
    return red ? (v ? gk[7:0] : gk[15:8]) : (v ? gk[23:16] : gk[31:24]);
  endfunction

  function automatic logic [31:0] r_rand_gk();
    logic [31:0] g;
    do g = $urandom; while (g[31:24] == g[23:16] || g[15:8] == g[7:0]);
    return g;
  endfunction

  // Garble a byte: label i carries bit i.
  function automatic logic [63:0] r_gbyte(logic [31:0] gk, bit red, logic [7:0] v);
    logic [63:0] y;
    for (int i = 0; i < 8; i++) y[8*i +: 8] = r_lbl(gk, red, v[i]);
    return y;
  endfunction

  // Ungarble a byte; ok = every label was one of the colour's two keys.
  function automatic logic [7:0] r_ungbyte(logic [31:0] gk, bit red, logic [63:0] g, output bit ok);
    logic [7:0] v;
    ok = 1;
    for (int i = 0; i < 8; i++) begin
      v[i] = (g[8*i +: 8] == r_lbl(gk, red, 1'b1));
      if (g[8*i +: 8] != r_lbl(gk, red, 1'b1) && g[8*i +: 8] != r_lbl(gk, red, 1'b0)) ok = 0;
    end
    return v;
  endfunction

endpackage
