// aes_ref_pkg: a plain behavioural AES-128 model used by the testbenches as the reference.
//
// It is written apart from the RTL on purpose: the S-box comes from a brute-force search for
// the multiplicative inverse, MixColumns and its inverse use a generic GF(2^8) multiply with
// the FIPS-197 coefficient matrices, and the state is handled as a 4x4 byte array. The
// testbenches also check this model against the FIPS-197 example vectors, so a fault shared by
// model and RTL would still show.
package aes_ref_pkg;

  typedef logic [7:0] b8;
  typedef b8 st_t [4][4];  // [row][col]

  function automatic b8 gmul(b8 a, b8 b);
    b8 p;
    p = 0;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= a;
      a = a[7] ? ((a << 1) ^ 8'h1b) : (a << 1);
    end
    return p;
  endfunction

  function automatic b8 ref_sbox(b8 x);
    b8 inv, s;
    inv = 0;
    for (int y = 1; y < 256; y++) if (gmul(x, b8'(y)) == 8'h01) inv = b8'(y);
    s = 8'h63;
    for (int i = 0; i < 8; i++)
      s[i] = s[i] ^ inv[i] ^ inv[(i + 4) % 8] ^ inv[(i + 5) % 8] ^ inv[(i + 6) % 8] ^ inv[(i + 7) % 8];
    return s;
  endfunction

  class aes_model;
    b8 sb [256];
    b8 isb [256];
    logic [127:0] rk [11];

    function new();
      for (int i = 0; i < 256; i++) sb[i] = ref_sbox(b8'(i));
      for (int i = 0; i < 256; i++) isb[sb[i]] = b8'(i);
    endfunction

    function void set_key(logic [127:0] key);
      logic [31:0] w [44];
      logic [31:0] t;
      b8 rc;
      rc = 8'h01;
      for (int i = 0; i < 4; i++) w[i] = key[127 - 32*i -: 32];
      for (int i = 4; i < 44; i++) begin
        t = w[i-1];
        if (i % 4 == 0) begin
          t = {t[23:0], t[31:24]};
          t = {sb[t[31:24]], sb[t[23:16]], sb[t[15:8]], sb[t[7:0]]} ^ {rc, 24'h0};
          rc = gmul(rc, 8'h02);
        end
        w[i] = w[i-4] ^ t;
      end
      for (int r = 0; r < 11; r++) rk[r] = {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
    endfunction

    static function void unpack(logic [127:0] v, output st_t s);
      for (int c = 0; c < 4; c++)
        for (int r = 0; r < 4; r++) s[r][c] = v[127 - 8*(4*c + r) -: 8];
    endfunction

    static function logic [127:0] pack(st_t s);
      logic [127:0] v;
      for (int c = 0; c < 4; c++)
        for (int r = 0; r < 4; r++) v[127 - 8*(4*c + r) -: 8] = s[r][c];
      return v;
    endfunction

    static function void mix(ref st_t s, input b8 m [4]);
      st_t t;
      for (int c = 0; c < 4; c++)
        for (int r = 0; r < 4; r++)
          t[r][c] = gmul(m[(4 - r) % 4], s[0][c]) ^ gmul(m[(5 - r) % 4], s[1][c]) ^
                    gmul(m[(6 - r) % 4], s[2][c]) ^ gmul(m[(7 - r) % 4], s[3][c]);
      s = t;
    endfunction

    function logic [127:0] encrypt(logic [127:0] pt);
      st_t s, t;
      b8 m [4];
      m = '{8'h02, 8'h03, 8'h01, 8'h01};  // row 0 of the MixColumns matrix
      pt = pt ^ rk[0];
      unpack(pt, s);
      for (int rnd = 1; rnd <= 10; rnd++) begin
        for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) t[r][c] = sb[s[r][(c + r) % 4]];
        s = t;
        if (rnd != 10) mix(s, m);
        unpack(pack(s) ^ rk[rnd], s);
      end
      return pack(s);
    endfunction

    function logic [127:0] decrypt(logic [127:0] ct);
      st_t s, t;
      b8 m [4];
      m = '{8'h0e, 8'h0b, 8'h0d, 8'h09};  // row 0 of the InvMixColumns matrix
      unpack(ct ^ rk[10], s);
      for (int rnd = 9; rnd >= 0; rnd--) begin
        for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) t[r][(c + r) % 4] = isb[s[r][c]];
        unpack(pack(t) ^ rk[rnd], s);
        if (rnd != 0) mix(s, m);
      end
      return pack(s);
    endfunction
  endclass

endpackage
