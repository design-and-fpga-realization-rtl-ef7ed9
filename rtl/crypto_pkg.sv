// crypto_pkg: types, constants and arithmetic helpers shared by the AES,
// ECC, random-number and control blocks of the hybrid cryptographic core.
//
// Cipher mode: the operator selects AES, ECC or the hybrid AES+ECC mode
// with a two-bit switch field. AES here is an 8-bit simplified AES: the
// state and the key are one byte each, the round count (10) and the four
// round steps (Sub Bytes, Shift Rows, Mix Columns, Add Round Key) follow
// AES-128, and the S-box is the real FIPS-197 S-box. How Shift Rows, Mix
// Columns and the key schedule act on a single byte is this design's own
// choice (see the functions below).
//
// ECC works over the prime field GF(251). The curve y^2 = x^3 + x + 4 with
// base point G = (0, 2) is this design's choice: its group has prime order
// 271, larger than any 8-bit scalar, so k*G is never the point at infinity
// for k in 1..255. Field products use Montgomery reduction with R = 2^8;
// field inverses come from a table that gf_inv_build fills at elaboration.
package crypto_pkg;

  // ------------------------------------------------------------------
  // Cipher mode select (algo_select switches)
  // ------------------------------------------------------------------
  typedef enum logic [1:0] {
    ALGO_AES     = 2'd0,  // AES with the random session key
    ALGO_ECC     = 2'd1,  // plaintext masked by x(k*G), k = random scalar
    ALGO_HYBRID  = 2'd2,  // AES keyed by x(k*G): ECC protects the AES key
    ALGO_HYBRID2 = 2'd3   // unused code, behaves as ALGO_HYBRID
  } algo_e;

  // ------------------------------------------------------------------
  // AES parameters and byte-level round functions
  // ------------------------------------------------------------------
  localparam int unsigned AES_ROUNDS = 10;

  typedef logic [7:0] byte_t;
  typedef byte_t sbox_table_t [256];
  typedef byte_t round_keys_t [AES_ROUNDS+1];

  // multiply by x in GF(2^8) modulo x^8+x^4+x^3+x+1
  function automatic byte_t gf8_xtime(byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic byte_t gf8_mul(byte_t a, byte_t b);
    byte_t acc = 8'h00;
    byte_t t   = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) acc ^= t;
      t = gf8_xtime(t);
    end
    return acc;
  endfunction

  // multiplicative inverse as a^254 (0 maps to 0, as in AES)
  function automatic byte_t gf8_inv(byte_t a);
    byte_t r = 8'h01;
    byte_t e = 8'd254;
    for (int i = 7; i >= 0; i--) begin
      r = gf8_mul(r, r);
      if (e[i]) r = gf8_mul(r, a);
    end
    return r;
  endfunction

  function automatic byte_t rotl8(byte_t a, int unsigned n);
    return byte_t'((a << n) | (a >> (8 - n)));
  endfunction

  // FIPS-197 S-box: affine transform of the field inverse
  function automatic byte_t sbox_compute(byte_t a);
    byte_t b = gf8_inv(a);
    return b ^ rotl8(b, 1) ^ rotl8(b, 2) ^ rotl8(b, 3) ^ rotl8(b, 4) ^ 8'h63;
  endfunction

  function automatic sbox_table_t sbox_build(bit inverse);
    sbox_table_t t;
    for (int i = 0; i < 256; i++) begin
      if (inverse) t[sbox_compute(byte_t'(i))] = byte_t'(i);
      else         t[i] = sbox_compute(byte_t'(i));
    end
    return t;
  endfunction

  // Shift Rows on one byte: the byte is a 2x2 array of 2-bit cells,
  // row 0 = bits [7:4], row 1 = bits [3:0]; row 1 rotates by one cell.
  // The step is its own inverse.
  function automatic byte_t shift_rows(byte_t s);
    return {s[7:4], s[1:0], s[3:2]};
  endfunction

  // Mix Columns on one byte: multiply by {03} in GF(2^8) (the diagonal
  // coefficient pair {02}+{01} of the AES matrix); inverse is {f6}.
  function automatic byte_t mix_columns(byte_t s);
    return gf8_xtime(s) ^ s;
  endfunction

  function automatic byte_t inv_mix_columns(byte_t s);
    return gf8_mul(s, 8'hf6);
  endfunction

  // AES round constants
  function automatic byte_t rcon(int unsigned r);
    byte_t c = 8'h01;
    for (int unsigned i = 1; i < r; i++) c = gf8_xtime(c);
    return c;
  endfunction

  // ------------------------------------------------------------------
  // ECC over GF(251), Montgomery form with R = 256
  // ------------------------------------------------------------------
  localparam logic [7:0] ECC_P       = 8'd251;
  localparam logic [7:0] ECC_PPRIME  = 8'd205;   // -P^-1 mod 256
  localparam logic [7:0] ECC_R2      = 8'd25;    // R^2 mod P
  localparam logic [7:0] ECC_A       = 8'd1;     // curve coefficient a
  localparam logic [7:0] ECC_B       = 8'd4;     // curve coefficient b
  localparam logic [7:0] ECC_GX      = 8'd0;     // base point x
  localparam logic [7:0] ECC_GY      = 8'd2;     // base point y
  localparam int unsigned ECC_ORDER  = 271;      // order of G

  typedef enum logic [2:0] {
    GF_ADD = 3'd0,
    GF_SUB = 3'd1,
    GF_MUL = 3'd2,   // Montgomery product a*b*R^-1 mod P
    GF_MOV = 3'd3,   // pass operand a
    GF_INV = 3'd4    // Montgomery-form inverse: (aR)^-1 * R^2 mod P
  } gf_op_e;

  // Inverse table in Montgomery form, computed at elaboration: for an
  // operand v = a*R mod P the entry is a^-1 * R mod P = v^(P-2) * R^2 mod P
  // (Fermat), and 0 for v = 0 or v >= P.
  typedef logic [7:0] gf_table_t [256];

  function automatic gf_table_t gf_inv_build();
    gf_table_t t;
    for (int v = 0; v < 256; v++) begin
      int r, b, e;
      r = 1;
      b = v;
      e = int'(ECC_P) - 2;
      while (e > 0) begin
        if (e % 2 == 1) r = (r * b) % int'(ECC_P);
        b = (b * b) % int'(ECC_P);
        e = e / 2;
      end
      t[v] = (v == 0 || v >= int'(ECC_P)) ? 8'd0 : 8'((r * int'(ECC_R2)) % int'(ECC_P));
    end
    return t;
  endfunction

  // ------------------------------------------------------------------
  // Seven-segment glyphs: 0..15 are the hex digits, then the letters the
  // display labels use
  // ------------------------------------------------------------------
  typedef enum logic [4:0] {
    GL_HEX0, GL_HEX1, GL_HEX2, GL_HEX3, GL_HEX4, GL_HEX5, GL_HEX6, GL_HEX7,
    GL_HEX8, GL_HEX9, GL_HEXA, GL_HEXB, GL_HEXC, GL_HEXD, GL_HEXE, GL_HEXF,
    GL_P = 5'd16, GL_T = 5'd17, GL_C = 5'd18, GL_D = 5'd19,
    GL_A = 5'd20, GL_Y = 5'd21, GL_BLANK = 5'd31
  } glyph_e;

  typedef glyph_e digits_t [8];   // digit 7 is the leftmost

endpackage
