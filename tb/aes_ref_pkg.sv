// aes_ref_pkg: reference model of AES-128 and of the Triple AES chain for
// the testbenches, written independently of the RTL.
//
// The S-box here is built by brute force: the multiplicative inverse of
// each byte is found by trying every candidate with a shift-and-add
// GF(2^8) multiplier, and the affine step is written with byte rotations
// (s = b ^ rotl(b,1) ^ rotl(b,2) ^ rotl(b,3) ^ rotl(b,4) ^ 63). The inverse
// S-box is the inverted table. The cipher works on a 4x4 byte array
// indexed [row][column], filled column by column from the 128-bit block
// (byte 0 in bits [127:120]). Call build_tables() once before use.
package aes_ref_pkg;

  byte unsigned sbox_t [256];
  byte unsigned isbox_t [256];

  function automatic byte unsigned gmul(byte unsigned a, byte unsigned b);
    byte unsigned p = 0;
    for (int i = 0; i < 8; i++) begin
      if (b[0]) p ^= a;
      a = a[7] ? ((a << 1) ^ 8'h1b) : (a << 1);
      b = b >> 1;
    end
    return p;
  endfunction

  function automatic byte unsigned rotl8(byte unsigned b, int n);
    return (b << n) | (b >> (8 - n));
  endfunction

  function automatic void build_tables();
    for (int x = 0; x < 256; x++) begin
      byte unsigned inv = 0;
      byte unsigned s;
      for (int y = 1; y < 256; y++)
        if (x != 0 && gmul(8'(x), 8'(y)) == 8'h01) inv = 8'(y);
      s = inv ^ rotl8(inv, 1) ^ rotl8(inv, 2) ^ rotl8(inv, 3) ^ rotl8(inv, 4) ^ 8'h63;
      sbox_t[x]  = s;
      isbox_t[s] = 8'(x);
    end
  endfunction

  typedef byte unsigned st_t [4][4];

  function automatic st_t to_st(logic [127:0] b);
    st_t s;
    for (int k = 0; k < 16; k++) s[k % 4][k / 4] = b[127 - 8*k -: 8];
    return s;
  endfunction

  function automatic logic [127:0] from_st(st_t s);
    logic [127:0] b;
    for (int k = 0; k < 16; k++) b[127 - 8*k -: 8] = s[k % 4][k / 4];
    return b;
  endfunction

  // Round keys 0..10 of an AES-128 key, as 128-bit blocks.
  function automatic void expand(logic [127:0] key, output logic [127:0] rk [11]);
    logic [31:0] w [44];
    byte unsigned rc = 8'h01;
    for (int i = 0; i < 4; i++) w[i] = key[127 - 32*i -: 32];
    for (int i = 4; i < 44; i++) begin
      logic [31:0] t = w[i-1];
      if (i % 4 == 0) begin
        t = {t[23:0], t[31:24]};
        t = {sbox_t[t[31:24]], sbox_t[t[23:16]], sbox_t[t[15:8]], sbox_t[t[7:0]]};
        t[31:24] ^= rc;
        rc = gmul(rc, 8'h02);
      end
      w[i] = w[i-4] ^ t;
    end
    for (int r = 0; r < 11; r++) rk[r] = {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
  endfunction

  function automatic st_t add_key(st_t s, logic [127:0] k);
    st_t kk = to_st(k);
    for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) s[r][c] ^= kk[r][c];
    return s;
  endfunction

  function automatic logic [127:0] encrypt(logic [127:0] key, logic [127:0] pt);
    logic [127:0] rk [11];
    st_t s, t;
    expand(key, rk);
    s = add_key(to_st(pt), rk[0]);
    for (int rnd = 1; rnd <= 10; rnd++) begin
      for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++)
        t[r][c] = sbox_t[s[r][(c + r) % 4]];
      s = t;
      if (rnd != 10)
        for (int c = 0; c < 4; c++)
          for (int r = 0; r < 4; r++)
            s[r][c] = gmul(8'h02, t[r][c]) ^ gmul(8'h03, t[(r+1)%4][c])
                    ^ t[(r+2)%4][c] ^ t[(r+3)%4][c];
      s = add_key(s, rk[rnd]);
    end
    return from_st(s);
  endfunction

  function automatic logic [127:0] decrypt(logic [127:0] key, logic [127:0] ct);
    logic [127:0] rk [11];
    st_t s, t;
    expand(key, rk);
    s = to_st(ct);
    for (int rnd = 10; rnd >= 1; rnd--) begin
      s = add_key(s, rk[rnd]);
      if (rnd != 10) begin
        t = s;
        for (int c = 0; c < 4; c++)
          for (int r = 0; r < 4; r++)
            s[r][c] = gmul(8'h0e, t[r][c]) ^ gmul(8'h0b, t[(r+1)%4][c])
                    ^ gmul(8'h0d, t[(r+2)%4][c]) ^ gmul(8'h09, t[(r+3)%4][c]);
      end
      for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++)
        t[r][(c + r) % 4] = isbox_t[s[r][c]];
      s = t;
    end
    return from_st(add_key(s, rk[0]));
  endfunction

  // Triple encryption; bit i of sel2 set: stage i uses k2.
  function automatic logic [127:0] taes_enc(logic [127:0] k1, logic [127:0] k2,
                                            logic [2:0] sel2, logic [127:0] pt);
    logic [127:0] d = pt;
    for (int i = 0; i < 3; i++) d = encrypt(sel2[i] ? k2 : k1, d);
    return d;
  endfunction

  function automatic logic [127:0] taes_dec(logic [127:0] k1, logic [127:0] k2,
                                            logic [2:0] sel2, logic [127:0] ct);
    logic [127:0] d = ct;
    for (int i = 2; i >= 0; i--) d = decrypt(sel2[i] ? k2 : k1, d);
    return d;
  endfunction

  function automatic logic [127:0] rand128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

endpackage
