// tb_ref_pkg: reference models used by the testbenches.
//
// These are written independently of the RTL: the S-box comes from a
// brute-force search for the field inverse, the field products from
// carry-less multiply and polynomial division, the ECC results from plain
// modular arithmetic with the % operator and inverses found by search.
package tb_ref_pkg;

  // carry-less product of two bytes reduced by x^8+x^4+x^3+x+1
  function automatic logic [7:0] ref_gmul(logic [7:0] a, logic [7:0] b);
    logic [15:0] p = '0;
    for (int i = 0; i < 8; i++) if (b[i]) p ^= 16'(a) << i;
    for (int i = 15; i >= 8; i--) if (p[i]) p ^= 16'h11b << (i - 8);
    return p[7:0];
  endfunction

  function automatic logic [7:0] ref_sbox(logic [7:0] a);
    logic [7:0] inv = 8'h00;
    logic [7:0] s;
    logic [7:0] c = 8'h63;
    for (int c = 1; c < 256; c++)
      if (a != 0 && ref_gmul(a, 8'(c)) == 8'h01) inv = 8'(c);
    for (int i = 0; i < 8; i++)
      s[i] = inv[i] ^ inv[(i+4)%8] ^ inv[(i+5)%8] ^ inv[(i+6)%8] ^ inv[(i+7)%8] ^ c[i];
    return s;
  endfunction

  function automatic logic [7:0] ref_inv_sbox(logic [7:0] a);
    for (int c = 0; c < 256; c++) if (ref_sbox(8'(c)) == a) return 8'(c);
    return 8'h00;
  endfunction

  // byte Shift Rows: swap the two 2-bit cells of the low nibble
  function automatic logic [7:0] ref_shift(logic [7:0] s);
    logic [7:0] r = s;
    r[1:0] = s[3:2];
    r[3:2] = s[1:0];
    return r;
  endfunction

  function automatic logic [7:0] ref_round_key(logic [7:0] key, int r);
    logic [7:0] k = key;
    logic [7:0] rc = 8'h01;
    for (int i = 1; i <= r; i++) begin
      k = k ^ ref_sbox({k[3:0], k[7:4]}) ^ rc;
      rc = ref_gmul(rc, 8'h02);
    end
    return k;
  endfunction

  function automatic logic [7:0] ref_aes_enc(logic [7:0] pt, logic [7:0] key);
    logic [7:0] s = pt ^ key;
    for (int r = 1; r <= 10; r++) begin
      s = ref_shift(ref_sbox(s));
      if (r != 10) s = ref_gmul(s, 8'h03);
      s = s ^ ref_round_key(key, r);
    end
    return s;
  endfunction

  // ---------------- GF(251) and the curve y^2 = x^3 + x + 4 -----------
  localparam int RP = 251;
  localparam int RA = 1;
  localparam int RB = 4;

  function automatic int ref_inv(int a);
    for (int c = 1; c < RP; c++) if ((a * c) % RP == 1) return c;
    return 0;
  endfunction

  typedef struct { int x; int y; bit inf; } pt_t;

  function automatic pt_t ref_add(pt_t p, pt_t q);
    pt_t r;
    int l;
    if (p.inf) return q;
    if (q.inf) return p;
    if (p.x == q.x && (p.y + q.y) % RP == 0) begin
      r.inf = 1; r.x = 0; r.y = 0; return r;
    end
    if (p.x == q.x)
      l = ((3 * p.x * p.x + RA) % RP) * ref_inv((2 * p.y) % RP) % RP;
    else
      l = ((q.y - p.y + RP) % RP) * ref_inv((q.x - p.x + RP) % RP) % RP;
    r.x = ((l * l - p.x - q.x) % RP + 2 * RP) % RP;
    r.y = ((l * ((p.x - r.x + RP) % RP) - p.y) % RP + RP) % RP;
    r.inf = 0;
    return r;
  endfunction

  // k*P by repeated addition (a different method from the RTL)
  function automatic pt_t ref_mul(int k, pt_t p);
    pt_t r;
    r.inf = 1; r.x = 0; r.y = 0;
    for (int i = 0; i < k; i++) r = ref_add(r, p);
    return r;
  endfunction

  function automatic bit ref_on_curve(int x, int y);
    return (y * y) % RP == (x * x * x + RA * x + RB) % RP;
  endfunction

endpackage
