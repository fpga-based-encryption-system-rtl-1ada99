// aes_pkg: types, constants and round functions shared by the AES-128 core.
//
// The AES core processes one 128-bit state at a time. A state is held with byte 0 of the
// FIPS-197 byte order in bits [127:120] and byte 15 in bits [7:0]; column c is bytes 4c..4c+3.
// The S-box and its inverse are not typed in as tables: they are computed at elaboration time
// from their definition (multiplicative inverse in GF(2^8) modulo x^8+x^4+x^3+x+1, followed by
// the affine transform), walking the field with the generator 3 and its inverse. The round
// functions below (SubBytes, ShiftRows, MixColumns and their inverses) are combinational; the
// encryption, decryption and key-expansion modules each apply one round per clock cycle.
// The ctrl_in / ctrl_out bit positions of the core are this design's own assignment: the
// source names the 32-bit control words but not their fields.
package aes_pkg;

  typedef logic [127:0] block_t;
  typedef logic [7:0]   byte_t;

  localparam int unsigned NR        = 10;  // AES-128 rounds
  localparam int unsigned NUM_RKEYS = NR + 1;
  localparam int unsigned RK_AW     = 4;   // round-key RAM address width

  // ctrl_in bit positions (32-bit control input of the core)
  localparam int unsigned CTRL_KEY_START = 0; // pulse: expand the key presented on d_in
  localparam int unsigned CTRL_START     = 1; // pulse: process the block presented on d_in
  localparam int unsigned CTRL_MODE      = 2; // level: 0 = encrypt, 1 = decrypt
  localparam int unsigned CTRL_CLEAR     = 3; // pulse: return the state machine to idle

  // ctrl_out bit positions (32-bit control output of the core)
  localparam int unsigned STAT_DONE      = 0; // d_out holds a finished block
  localparam int unsigned STAT_KEY_READY = 1; // round keys are in the RAM
  localparam int unsigned STAT_BUSY      = 2; // key expansion or a round loop is running
  localparam int unsigned STAT_MODE      = 3; // mode of the block in d_out

  typedef enum logic {MODE_ENC = 1'b0, MODE_DEC = 1'b1} mode_e;

  // multiply by x in GF(2^8)
  function automatic byte_t xtime(byte_t b);
    return {b[6:0], 1'b0} ^ (b[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic byte_t rotl8(byte_t b, int unsigned n);
    return byte_t'((b << n) | (b >> (8 - n)));
  endfunction

  // S-box built from the generator walk: p runs over the powers of 3, q over the powers of
  // 3^-1, so q = p^-1 at every step.
  function automatic logic [2047:0] gen_sbox();
    logic [2047:0] t;
    byte_t p, q, x;
    t = '0;
    p = 8'h01;
    q = 8'h01;
    t[7:0] = 8'h63;  // entry 0 (0 has no inverse)
    for (int i = 0; i < 255; i++) begin
      p = p ^ xtime(p);
      q = q ^ {q[6:0], 1'b0};
      q = q ^ {q[5:0], 2'b00};
      q = q ^ {q[3:0], 4'b0000};
      if (q[7]) q = q ^ 8'h09;
      x = q ^ rotl8(q, 1) ^ rotl8(q, 2) ^ rotl8(q, 3) ^ rotl8(q, 4) ^ 8'h63;
      t[8*p +: 8] = x;
    end
    return t;
  endfunction

  function automatic logic [2047:0] gen_inv_sbox(logic [2047:0] s);
    logic [2047:0] t;
    t = '0;
    for (int i = 0; i < 256; i++) t[8*s[8*i +: 8] +: 8] = 8'(i);
    return t;
  endfunction

  localparam logic [2047:0] SBOX     = gen_sbox();
  localparam logic [2047:0] INV_SBOX = gen_inv_sbox(SBOX);

  function automatic byte_t sbox(byte_t b);
    return SBOX[8*b +: 8];
  endfunction

  function automatic byte_t inv_sbox(byte_t b);
    return INV_SBOX[8*b +: 8];
  endfunction

  function automatic byte_t get_byte(block_t s, int unsigned i);
    return s[127 - 8*i -: 8];
  endfunction

  function automatic block_t sub_bytes(block_t s);
    block_t r;
    for (int i = 0; i < 16; i++) r[127 - 8*i -: 8] = sbox(get_byte(s, i));
    return r;
  endfunction

  function automatic block_t inv_sub_bytes(block_t s);
    block_t r;
    for (int i = 0; i < 16; i++) r[127 - 8*i -: 8] = inv_sbox(get_byte(s, i));
    return r;
  endfunction

  // byte (row r, column c) is byte 4c+r; ShiftRows moves row r left by r columns
  function automatic block_t shift_rows(block_t s);
    block_t r;
    for (int c = 0; c < 4; c++)
      for (int row = 0; row < 4; row++)
        r[127 - 8*(4*c + row) -: 8] = get_byte(s, 4*((c + row) % 4) + row);
    return r;
  endfunction

  function automatic block_t inv_shift_rows(block_t s);
    block_t r;
    for (int c = 0; c < 4; c++)
      for (int row = 0; row < 4; row++)
        r[127 - 8*(4*((c + row) % 4) + row) -: 8] = get_byte(s, 4*c + row);
    return r;
  endfunction

  function automatic logic [31:0] mix_column(logic [31:0] col);
    byte_t a0, a1, a2, a3;
    {a0, a1, a2, a3} = col;
    return {xtime(a0) ^ xtime(a1) ^ a1 ^ a2 ^ a3,
            a0 ^ xtime(a1) ^ xtime(a2) ^ a2 ^ a3,
            a0 ^ a1 ^ xtime(a2) ^ xtime(a3) ^ a3,
            xtime(a0) ^ a0 ^ a1 ^ a2 ^ xtime(a3)};
  endfunction

  // InvMixColumns = MixColumns after a pre-multiplication by {04}x^2 + {05} (FIPS-197 coefficients
  // 0e 0b 0d 09 factorised), which keeps the logic to xtime chains
  function automatic logic [31:0] inv_mix_column(logic [31:0] col);
    byte_t a0, a1, a2, a3, u, v;
    {a0, a1, a2, a3} = col;
    u = xtime(xtime(a0 ^ a2));
    v = xtime(xtime(a1 ^ a3));
    return mix_column({a0 ^ u, a1 ^ v, a2 ^ u, a3 ^ v});
  endfunction

  function automatic block_t mix_columns(block_t s);
    block_t r;
    for (int c = 0; c < 4; c++) r[127 - 32*c -: 32] = mix_column(s[127 - 32*c -: 32]);
    return r;
  endfunction

  function automatic block_t inv_mix_columns(block_t s);
    block_t r;
    for (int c = 0; c < 4; c++) r[127 - 32*c -: 32] = inv_mix_column(s[127 - 32*c -: 32]);
    return r;
  endfunction

  function automatic logic [31:0] sub_word(logic [31:0] w);
    return {sbox(w[31:24]), sbox(w[23:16]), sbox(w[15:8]), sbox(w[7:0])};
  endfunction

  // one key-schedule step: round key i from round key i-1 and rcon_i
  function automatic block_t next_round_key(block_t k, byte_t rcon);
    logic [31:0] w0, w1, w2, w3, t;
    {w0, w1, w2, w3} = k;
    t  = sub_word({w3[23:0], w3[31:24]}) ^ {rcon, 24'h0};
    w0 = w0 ^ t;
    w1 = w1 ^ w0;
    w2 = w2 ^ w1;
    w3 = w3 ^ w2;
    return {w0, w1, w2, w3};
  endfunction

endpackage
