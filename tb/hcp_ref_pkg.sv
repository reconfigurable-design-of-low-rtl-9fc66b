// hcp_ref_pkg: behavioural reference models used by the testbenches.
//
// Written independently of the RTL and deliberately in the plainest form:
//  * GF(2^163) arithmetic by shift-and-add multiplication, inversion by Fermat's theorem;
//  * affine point addition and doubling on y^2 + xy = x^3 + a x^2 + b and double-and-add
//    scalar multiplication (with full y coordinates, unlike the x-only ladder in the RTL);
//  * Keccak-f[1600] with round constants generated by the LFSR of the specification and
//    rotation offsets generated by its (x, y) walk, and the SHA3-256-style sponge hash.
package hcp_ref_pkg;

  localparam int M = 163;
  typedef logic [M-1:0] fe_t;
  localparam fe_t POLY = 163'hC9;

  // B-163 curve and base point.
  localparam fe_t CURVE_A = 163'h1;
  localparam fe_t CURVE_B = 163'h2_0A60_1907_B8C9_53CA_1481_EB10_512F_7874_4A32_05FD;
  localparam fe_t GX = 163'h3_F0EB_A162_86A2_D57E_A099_1168_D499_4637_E834_3E36;
  localparam fe_t GY = 163'h0_D51F_BC6C_71A0_094F_A2CD_D545_B11C_5C0C_7973_24F1;

  typedef struct {
    fe_t x;
    fe_t y;
    bit  inf;
  } point_t;

  function automatic fe_t gf_mul(fe_t a, fe_t b);
    fe_t r = '0;
    fe_t t = a;
    for (int i = 0; i < M; i++) begin
      if (b[i]) r ^= t;
      if (t[M-1]) t = (t << 1) ^ POLY;
      else t = t << 1;
    end
    return r;
  endfunction

  function automatic fe_t gf_inv(fe_t a);
    fe_t r = 163'h1;
    fe_t t = a;
    for (int i = 1; i < M; i++) begin
      t = gf_mul(t, t);
      r = gf_mul(r, t);
    end
    return r;
  endfunction

  function automatic bit on_curve(point_t p);
    fe_t lhs, rhs, x2;
    if (p.inf) return 1;
    x2  = gf_mul(p.x, p.x);
    lhs = gf_mul(p.y, p.y) ^ gf_mul(p.x, p.y);
    rhs = gf_mul(x2, p.x) ^ gf_mul(CURVE_A, x2) ^ CURVE_B;
    return lhs == rhs;
  endfunction

  function automatic point_t pt_double(point_t p);
    point_t r;
    fe_t l;
    if (p.inf || p.x == '0) begin
      r.inf = 1; r.x = '0; r.y = '0;
      return r;
    end
    l = p.x ^ gf_mul(p.y, gf_inv(p.x));
    r.x = gf_mul(l, l) ^ l ^ CURVE_A;
    r.y = gf_mul(p.x, p.x) ^ gf_mul(l ^ 163'h1, r.x);
    r.inf = 0;
    return r;
  endfunction

  function automatic point_t pt_add(point_t p, point_t q);
    point_t r;
    fe_t l;
    if (p.inf) return q;
    if (q.inf) return p;
    if (p.x == q.x) begin
      if (p.y == q.y) return pt_double(p);
      r.inf = 1; r.x = '0; r.y = '0;
      return r;
    end
    l = gf_mul(p.y ^ q.y, gf_inv(p.x ^ q.x));
    r.x = gf_mul(l, l) ^ l ^ p.x ^ q.x ^ CURVE_A;
    r.y = gf_mul(l, p.x ^ r.x) ^ r.x ^ p.y;
    r.inf = 0;
    return r;
  endfunction

  function automatic point_t pt_mul(logic [M-1:0] k, point_t p);
    point_t r;
    r.inf = 1; r.x = '0; r.y = '0;
    for (int i = M - 1; i >= 0; i--) begin
      r = pt_double(r);
      if (k[i]) r = pt_add(r, p);
    end
    return r;
  endfunction

  function automatic point_t base_point();
    point_t g;
    g.x = GX; g.y = GY; g.inf = 0;
    return g;
  endfunction

  // ---------------------------------------------------------------- Keccak reference
  typedef logic [63:0] lane_t;
  typedef lane_t kstate_t [25];

  function automatic bit rc_bit(int t);
    logic [8:0] r = 9'h001;
    if (t % 255 == 0) return 1;
    for (int i = 1; i <= t % 255; i++) begin
      r = {r[7:0], 1'b0};
      r[0] ^= r[8]; r[4] ^= r[8]; r[5] ^= r[8]; r[6] ^= r[8];
      r[8] = 1'b0;
    end
    return r[0];
  endfunction

  function automatic lane_t round_const(int ir);
    lane_t c = '0;
    for (int j = 0; j <= 6; j++) c[(1 << j) - 1] = rc_bit(j + 7 * ir);
    return c;
  endfunction

  function automatic int rho_off(int xx, int yy);
    int x = 1, y = 0, t2;
    if (xx == 0 && yy == 0) return 0;
    for (int t = 0; t < 24; t++) begin
      if (x == xx && y == yy) return ((t + 1) * (t + 2) / 2) % 64;
      t2 = (2 * x + 3 * y) % 5;
      x = y;
      y = t2;
    end
    return -1;
  endfunction

  function automatic lane_t rotl(lane_t v, int n);
    if (n == 0) return v;
    return (v << n) | (v >> (64 - n));
  endfunction

  function automatic kstate_t keccak_round_ref(kstate_t a, int ir);
    lane_t c [5];
    lane_t d [5];
    kstate_t b;
    for (int x = 0; x < 5; x++) c[x] = a[x] ^ a[x+5] ^ a[x+10] ^ a[x+15] ^ a[x+20];
    for (int x = 0; x < 5; x++) d[x] = c[(x+4)%5] ^ rotl(c[(x+1)%5], 1);
    for (int i = 0; i < 25; i++) a[i] ^= d[i%5];
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++)
        b[y + 5*((2*x + 3*y) % 5)] = rotl(a[x + 5*y], rho_off(x, y));
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++)
        a[x + 5*y] = b[x + 5*y] ^ (~b[(x+1)%5 + 5*y] & b[(x+2)%5 + 5*y]);
    a[0] ^= round_const(ir);
    return a;
  endfunction

  function automatic kstate_t keccak_f(kstate_t a);
    for (int ir = 0; ir < 24; ir++) a = keccak_round_ref(a, ir);
    return a;
  endfunction

  // Sponge state after absorbing msg with rate rate_bytes and SHA-3 domain padding.
  function automatic kstate_t sponge_state(byte unsigned msg [$], int rate_bytes);
    kstate_t s;
    byte unsigned p [$];
    p = msg;
    p.push_back(8'h06);
    while (p.size() % rate_bytes != 0) p.push_back(8'h00);
    p[p.size()-1] |= 8'h80;
    for (int i = 0; i < 25; i++) s[i] = '0;
    for (int blk = 0; blk < p.size() / rate_bytes; blk++) begin
      for (int i = 0; i < rate_bytes; i++)
        s[i/8][8*(i%8) +: 8] ^= p[blk*rate_bytes + i];
      s = keccak_f(s);
    end
    return s;
  endfunction

  function automatic logic [255:0] first_256(kstate_t s);
    logic [255:0] out;
    for (int i = 0; i < 4; i++) out[64*i +: 64] = s[i];
    return out;
  endfunction

  // Sponge hash with rate rate_bytes, SHA-3 domain padding, 32-byte output.
  function automatic logic [255:0] sponge_hash(byte unsigned msg [$], int rate_bytes);
    return first_256(sponge_state(msg, rate_bytes));
  endfunction

endpackage
