// tb_ref_pkg: behavioural reference models for the testbenches.
// Written from the cipher definitions, independently of the RTL: the S-box
// is computed as x^254 by repeated multiplication, the ciphers are stepped
// word by word with plain arrays. Published test vectors in the individual
// testbenches check these models in turn.
package tb_ref_pkg;

  function automatic logic [7:0] r_gmul(logic [7:0] a, logic [7:0] b, logic [8:0] poly);
    logic [15:0] prod;
    prod = '0;
    for (int i = 0; i < 8; i++) if (b[i]) prod ^= 16'(a) << i;
    for (int i = 15; i >= 8; i--) if (prod[i]) prod ^= 16'(poly) << (i - 8);
    return prod[7:0];
  endfunction

  function automatic logic [7:0] r_sbox(logic [7:0] x);
    logic [7:0] inv, s;
    inv = 8'h01;
    for (int i = 0; i < 254; i++) inv = r_gmul(inv, x, 9'h11B);
    if (x == 0) inv = 0;
    s = inv ^ {inv[6:0], inv[7]} ^ {inv[5:0], inv[7:6]} ^ {inv[4:0], inv[7:5]} ^ {inv[3:0], inv[7:4]} ^ 8'h63;
    return s;
  endfunction

  // ---------------- MUGI ----------------
  localparam logic [63:0] RC0 = 64'h6A09E667F3BCC908;
  localparam logic [63:0] RC1 = 64'hBB67AE8584CAA73B;
  localparam logic [63:0] RC2 = 64'h3C6EF372FE94F82B;

  function automatic logic [63:0] rotl64(logic [63:0] x, int n);
    return (x << n) | (x >> (64 - n));
  endfunction

  function automatic logic [63:0] r_mugi_f(logic [63:0] x, logic [63:0] k);
    logic [7:0] o [8];
    logic [7:0] s [8];
    logic [7:0] q [8];
    logic [63:0] o64;
    o64 = x ^ k;
    for (int i = 0; i < 8; i++) begin
      o[i] = o64[63 - 8*i -: 8];
      s[i] = r_sbox(o[i]);
    end
    for (int h = 0; h < 8; h += 4) begin
      q[h+0] = r_gmul(s[h],8'd2,9'h11B) ^ r_gmul(s[h+1],8'd3,9'h11B) ^ s[h+2] ^ s[h+3];
      q[h+1] = s[h] ^ r_gmul(s[h+1],8'd2,9'h11B) ^ r_gmul(s[h+2],8'd3,9'h11B) ^ s[h+3];
      q[h+2] = s[h] ^ s[h+1] ^ r_gmul(s[h+2],8'd2,9'h11B) ^ r_gmul(s[h+3],8'd3,9'h11B);
      q[h+3] = r_gmul(s[h],8'd3,9'h11B) ^ s[h+1] ^ s[h+2] ^ r_gmul(s[h+3],8'd2,9'h11B);
    end
    return {q[4], q[5], q[2], q[3], q[0], q[1], q[6], q[7]};
  endfunction

  typedef logic [63:0] w64_t;
  typedef w64_t a_t [3];
  typedef w64_t b_t [16];

  function automatic void r_mugi_update(ref a_t a, ref b_t b, input bit use_b, input bit do_lambda);
    a_t na;
    b_t nb;
    logic [63:0] b4, b10;
    b4  = use_b ? b[4]  : 64'd0;
    b10 = use_b ? b[10] : 64'd0;
    na[0] = a[1];
    na[1] = a[2] ^ r_mugi_f(a[1], b4) ^ RC1;
    na[2] = a[0] ^ r_mugi_f(a[1], rotl64(b10, 17)) ^ RC2;
    if (do_lambda) begin
      for (int j = 1; j < 16; j++) nb[j] = b[j-1];
      nb[0]  = b[15] ^ a[0];
      nb[4]  = b[3] ^ b[7];
      nb[10] = b[9] ^ rotl64(b[13], 32);
      b = nb;
    end
    a = na;
  endfunction

  // n keystream words of MUGI for key k and IV iv.
  function automatic void r_mugi(input logic [127:0] k, input logic [127:0] iv, input int n,
                                 ref logic [63:0] out []);
    a_t a;
    b_t b;
    out = new[n];
    a[0] = k[127:64]; a[1] = k[63:0];
    a[2] = rotl64(a[0], 7) ^ rotl64(a[1], 57) ^ RC0;
    for (int j = 0; j < 16; j++) b[j] = 0;
    for (int i = 0; i < 16; i++) begin
      r_mugi_update(a, b, 0, 0);
      b[15 - i] = a[0];
    end
    a[0] ^= iv[127:64]; a[1] ^= iv[63:0];
    a[2] ^= rotl64(iv[127:64], 7) ^ rotl64(iv[63:0], 57) ^ RC0;
    for (int i = 0; i < 16; i++) r_mugi_update(a, b, 0, 0);
    for (int i = 0; i < 16; i++) r_mugi_update(a, b, 1, 1);
    for (int i = 0; i < n; i++) begin
      out[i] = a[2];
      r_mugi_update(a, b, 1, 1);
    end
  endfunction

  // ---------------- SNOW 2.0 ----------------
  function automatic logic [7:0] r_beta_pow(int n);
    logic [7:0] r;
    r = 8'h01;
    for (int i = 0; i < n; i++) r = r_gmul(r, 8'h02, 9'h1A9);
    return r;
  endfunction

  function automatic logic [31:0] r_mul_alpha(logic [31:0] w);
    logic [7:0] c;
    c = w[31:24];
    return (w << 8) ^ {r_gmul(c, r_beta_pow(23), 9'h1A9), r_gmul(c, r_beta_pow(245), 9'h1A9),
                       r_gmul(c, r_beta_pow(48), 9'h1A9), r_gmul(c, r_beta_pow(239), 9'h1A9)};
  endfunction

  function automatic logic [31:0] r_div_alpha(logic [31:0] w);
    logic [7:0] c;
    c = w[7:0];
    return (w >> 8) ^ {r_gmul(c, r_beta_pow(16), 9'h1A9), r_gmul(c, r_beta_pow(39), 9'h1A9),
                       r_gmul(c, r_beta_pow(6), 9'h1A9), r_gmul(c, r_beta_pow(64), 9'h1A9)};
  endfunction

  // SNOW 2.0 S transform: SubBytes then MixColumn, byte 0 = least significant.
  function automatic logic [31:0] r_snow_s(logic [31:0] w);
    logic [7:0] s [4];
    logic [7:0] r [4];
    for (int i = 0; i < 4; i++) s[i] = r_sbox(w[8*i +: 8]);
    r[0] = r_gmul(s[0],8'd2,9'h11B) ^ r_gmul(s[1],8'd3,9'h11B) ^ s[2] ^ s[3];
    r[1] = s[0] ^ r_gmul(s[1],8'd2,9'h11B) ^ r_gmul(s[2],8'd3,9'h11B) ^ s[3];
    r[2] = s[0] ^ s[1] ^ r_gmul(s[2],8'd2,9'h11B) ^ r_gmul(s[3],8'd3,9'h11B);
    r[3] = r_gmul(s[0],8'd3,9'h11B) ^ s[1] ^ s[2] ^ r_gmul(s[3],8'd2,9'h11B);
    return {r[3], r[2], r[1], r[0]};
  endfunction

  typedef logic [31:0] w32_t;
  typedef w32_t lfsr_t [16];

  function automatic void r_snow_clock(ref lfsr_t s, ref logic [31:0] r1, ref logic [31:0] r2,
                                       input bit init);
    logic [31:0] f, fb, nr1;
    f   = (s[15] + r1) ^ r2;
    fb  = r_div_alpha(s[11]) ^ s[2] ^ r_mul_alpha(s[0]) ^ (init ? f : 32'd0);
    nr1 = s[5] + r2;
    r2  = r_snow_s(r1);
    r1  = nr1;
    for (int i = 0; i < 15; i++) s[i] = s[i+1];
    s[15] = fb;
  endfunction

  function automatic void r_snow_load(input logic [127:0] k, input logic [127:0] iv,
                                      ref lfsr_t s);
    logic [31:0] k0, k1, k2, k3, v0, v1, v2, v3, o;
    {k3, k2, k1, k0} = k;
    {v3, v2, v1, v0} = iv;
    o = '1;
    s[15] = k3 ^ v0;  s[14] = k2;          s[13] = k1;          s[12] = k0 ^ v1;
    s[11] = k3 ^ o;   s[10] = k2 ^ o ^ v2; s[9]  = k1 ^ o ^ v3; s[8]  = k0 ^ o;
    s[7]  = k3;       s[6]  = k2;          s[5]  = k1;          s[4]  = k0;
    s[3]  = k3 ^ o;   s[2]  = k2 ^ o;      s[1]  = k1 ^ o;      s[0]  = k0 ^ o;
  endfunction

  function automatic void r_snow(input logic [127:0] k, input logic [127:0] iv, input int n,
                                 ref logic [31:0] out []);
    lfsr_t s;
    logic [31:0] r1, r2;
    out = new[n];
    r_snow_load(k, iv, s);
    r1 = 0; r2 = 0;
    for (int i = 0; i < 32; i++) r_snow_clock(s, r1, r2, 1);
    r_snow_clock(s, r1, r2, 0);
    for (int i = 0; i < n; i++) begin
      out[i] = ((s[15] + r1) ^ r2) ^ s[0];
      r_snow_clock(s, r1, r2, 0);
    end
  endfunction

  // ---------------- TRIVIUM ----------------
  // Bits are numbered 1..288 as in the cipher definition; st[0] is unused.
  function automatic void r_trivium(input logic [79:0] key, input logic [79:0] iv, input int n,
                                    ref bit out []);
    bit st [289];
    bit t1, t2, t3;
    out = new[n];
    foreach (st[i]) st[i] = 0;
    for (int i = 1; i <= 80; i++) st[i] = key[i-1];
    for (int i = 1; i <= 80; i++) st[93 + i] = iv[i-1];
    st[286] = 1; st[287] = 1; st[288] = 1;
    for (int r = 0; r < 4*288 + n; r++) begin
      t1 = st[66] ^ st[93];
      t2 = st[162] ^ st[177];
      t3 = st[243] ^ st[288];
      if (r >= 4*288) out[r - 4*288] = t1 ^ t2 ^ t3;
      t1 = t1 ^ (st[91] & st[92]) ^ st[171];
      t2 = t2 ^ (st[175] & st[176]) ^ st[264];
      t3 = t3 ^ (st[286] & st[287]) ^ st[69];
      for (int i = 288; i >= 2; i--) st[i] = st[i-1];
      st[1] = t3; st[94] = t1; st[178] = t2;
    end
  endfunction

  // ---------------- MICKEY-128 family register model ----------------
  typedef struct {
    logic [127:0] rtaps, comp0, comp1, fb0, fb1;
  } mickey_const_t;

  function automatic void r_clock_r(ref bit r [128], input bit in_bit, input bit ctl,
                                    input logic [127:0] rtaps);
    bit nr [128];
    bit fb;
    fb = r[127] ^ in_bit;
    nr[0] = 0;
    for (int i = 1; i < 128; i++) nr[i] = r[i-1];
    for (int i = 0; i < 128; i++) begin
      if (rtaps[i]) nr[i] ^= fb;
      if (ctl) nr[i] ^= r[i];
    end
    r = nr;
  endfunction

  function automatic void r_clock_s(ref bit s [128], input bit in_bit, input bit ctl,
                                    input mickey_const_t c);
    bit hs [128];
    bit fb;
    fb = s[127] ^ in_bit;
    hs[0] = 0;
    hs[127] = s[126];
    for (int i = 1; i < 127; i++)
      hs[i] = s[i-1] ^ ((s[i] ^ c.comp0[i]) & (s[i+1] ^ c.comp1[i]));
    for (int i = 0; i < 128; i++)
      s[i] = hs[i] ^ ((ctl ? c.fb1[i] : c.fb0[i]) & fb);
  endfunction

  function automatic void r_clock_kg(ref bit r [128], ref bit s [128], input bit mixing,
                                     input bit in_bit, input mickey_const_t c);
    bit cr, cs, ir;
    cr = s[43] ^ r[85];
    cs = s[85] ^ r[42];
    ir = mixing ? (in_bit ^ s[64]) : in_bit;
    r_clock_r(r, ir, cr, c.rtaps);
    r_clock_s(s, in_bit, cs, c);
  endfunction

  function automatic void r_mickey(input logic [127:0] key, input logic [127:0] iv, input int iv_len,
                                   input int n, input mickey_const_t c, ref bit out []);
    bit r [128];
    bit s [128];
    out = new[n];
    foreach (r[i]) begin r[i] = 0; s[i] = 0; end
    for (int i = 0; i < iv_len; i++) r_clock_kg(r, s, 1, iv[i], c);
    for (int i = 0; i < 128; i++)    r_clock_kg(r, s, 1, key[i], c);
    for (int i = 0; i < 128; i++)    r_clock_kg(r, s, 1, 0, c);
    for (int i = 0; i < n; i++) begin
      out[i] = r[0] ^ s[0];
      r_clock_kg(r, s, 0, 0, c);
    end
  endfunction

endpackage
