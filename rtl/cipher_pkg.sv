// cipher_pkg: constants and elaboration-time table generators shared by the
// stream cipher cores.
//
// The byte-wide S-box of AES (used by MUGI's F-function and SNOW 2.0's FSM),
// the AES T-tables used by SNOW 2.0's S transform, and SNOW 2.0's MUL_a /
// MUL_ainverse tables are all computed here from their algebraic definitions
// by constant functions, so no table is stored in the sources:
//   * AES S-box: inverse in GF(2^8) mod x^8+x^4+x^3+x+1 (0x11B), then the
//     affine map b ^ rot(b,1) ^ rot(b,2) ^ rot(b,3) ^ rot(b,4) ^ 0x63.
//   * SNOW 2.0 alpha tables: GF(2^8) mod x^8+x^7+x^5+x^3+1 (0x1A9), beta = 0x02,
//     MUL_a[c] = (c*b^23, c*b^245, c*b^48, c*b^239), most significant byte first,
//     MUL_ainverse[c] = (c*b^16, c*b^39, c*b^6, c*b^64).
// The MUGI constants C0..C2 are the first 64 bits of the fractional parts of
// the square roots of 2, 3 and 5.
package cipher_pkg;

  typedef logic [255:0][7:0]  byte_table_t;
  typedef logic [255:0][31:0] word_table_t;

  localparam logic [63:0] MUGI_C0 = 64'h6A09E667F3BCC908;
  localparam logic [63:0] MUGI_C1 = 64'hBB67AE8584CAA73B;
  localparam logic [63:0] MUGI_C2 = 64'h3C6EF372FE94F82B;

  // Multiply two elements of GF(2^8) reduced by the 9-bit polynomial poly.
  function automatic logic [7:0] gf_mul(logic [7:0] a, logic [7:0] b, logic [8:0] poly);
    logic [8:0] aa;
    logic [7:0] r;
    aa = {1'b0, a};
    r  = '0;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) r ^= aa[7:0];
      aa = aa << 1;
      if (aa[8]) aa ^= poly;
    end
    return r;
  endfunction

  function automatic logic [7:0] gf_pow(logic [7:0] a, int n, logic [8:0] poly);
    logic [7:0] r;
    r = 8'h01;
    for (int i = 0; i < n; i++) r = gf_mul(r, a, poly);
    return r;
  endfunction

  // AES S-box table. Inverses are found through exp/log tables of the
  // generator 0x03.
  function automatic byte_table_t gen_aes_sbox();
    byte_table_t t;
    logic [7:0] exp_t [256];
    logic [7:0] log_t [256];
    logic [7:0] x, inv, s;
    x = 8'h01;
    for (int i = 0; i < 256; i++) begin
      exp_t[i] = x;
      log_t[i] = '0;
      x = gf_mul(x, 8'h03, 9'h11B);
    end
    for (int i = 0; i < 255; i++) log_t[exp_t[i]] = 8'(i);
    for (int c = 0; c < 256; c++) begin
      if (c == 0) inv = 8'h00;
      else inv = exp_t[(255 - int'(log_t[c])) % 255];
      s = 8'h63;
      for (int i = 0; i < 8; i++)
        s[i] = s[i] ^ inv[i] ^ inv[(i+4)%8] ^ inv[(i+5)%8] ^ inv[(i+6)%8] ^ inv[(i+7)%8];
      t[c] = s;
    end
    return t;
  endfunction

  localparam byte_table_t AES_SBOX = gen_aes_sbox();

  // AES MixColumns of one column; p[3] is the first row element.
  function automatic logic [31:0] aes_mix(logic [3:0][7:0] p);
    logic [3:0][7:0] q;
    q[3] = gf_mul(p[3], 8'h02, 9'h11B) ^ gf_mul(p[2], 8'h03, 9'h11B) ^ p[1] ^ p[0];
    q[2] = p[3] ^ gf_mul(p[2], 8'h02, 9'h11B) ^ gf_mul(p[1], 8'h03, 9'h11B) ^ p[0];
    q[1] = p[3] ^ p[2] ^ gf_mul(p[1], 8'h02, 9'h11B) ^ gf_mul(p[0], 8'h03, 9'h11B);
    q[0] = gf_mul(p[3], 8'h03, 9'h11B) ^ p[2] ^ p[1] ^ gf_mul(p[0], 8'h02, 9'h11B);
    return q;
  endfunction

  // SNOW 2.0 T-table number n (0..3): S-box output s of input byte c enters
  // column n of the MixColumns matrix, least significant byte = row 0.
  function automatic word_table_t gen_snow_t(int n);
    word_table_t t;
    byte_table_t sb;
    logic [7:0] s;
    logic [31:0] col;
    sb = gen_aes_sbox();
    for (int c = 0; c < 256; c++) begin
      s   = sb[c];
      col = {gf_mul(s, 8'h03, 9'h11B), s, s, gf_mul(s, 8'h02, 9'h11B)};
      t[c] = (n == 0) ? col : ((col << (8*n)) | (col >> (32 - 8*n)));
    end
    return t;
  endfunction

  function automatic word_table_t gen_snow_mul(bit inverse);
    word_table_t t;
    logic [3:0][7:0] g;
    if (!inverse) begin
      g[3] = gf_pow(8'h02, 23, 9'h1A9);  g[2] = gf_pow(8'h02, 245, 9'h1A9);
      g[1] = gf_pow(8'h02, 48, 9'h1A9);  g[0] = gf_pow(8'h02, 239, 9'h1A9);
    end else begin
      g[3] = gf_pow(8'h02, 16, 9'h1A9);  g[2] = gf_pow(8'h02, 39, 9'h1A9);
      g[1] = gf_pow(8'h02, 6, 9'h1A9);   g[0] = gf_pow(8'h02, 64, 9'h1A9);
    end
    for (int c = 0; c < 256; c++)
      for (int j = 0; j < 4; j++)
        t[c][8*j +: 8] = gf_mul(8'(c), g[j], 9'h1A9);
    return t;
  endfunction

endpackage
