// aes_ref_pkg: behavioural reference model of the modified AES-256, used by
// the testbenches only. It is written independently of the RTL: the S-box is
// computed from the GF(2^8) inverse (x^254) and the affine map instead of a
// table, the state is a 4x4 byte matrix, and the key schedule is the
// word-by-word w[0..59] formulation. With modified = 0 it is plain AES-256,
// which lets a testbench check the model against the FIPS-197 example.
package aes_ref_pkg;

  typedef logic [7:0] b8;
  typedef b8 mat_t [4][4];          // [row][column]

  b8 sb_t  [256];
  b8 isb_t [256];

  function automatic b8 gf_mul(b8 a, b8 b);
    b8 p = 0;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= a;
      a = a[7] ? ((a << 1) ^ 8'h1b) : (a << 1);
    end
    return p;
  endfunction

  function automatic b8 rotl8(b8 x, int k);
    return (x << k) | (x >> (8 - k));
  endfunction

  function automatic b8 calc_sbox(b8 x);
    b8 inv = 8'h01, base = x;
    // x^254 = inverse (0 maps to 0)
    for (int e = 254, i = 0; i < 8; i++) begin
      if (e[i]) inv = gf_mul(inv, base);
      base = gf_mul(base, base);
    end
    if (x == 0) inv = 0;
    return inv ^ rotl8(inv, 1) ^ rotl8(inv, 2) ^ rotl8(inv, 3) ^ rotl8(inv, 4) ^ 8'h63;
  endfunction

  function automatic void ref_init();
    for (int i = 0; i < 256; i++) begin
      sb_t[i] = calc_sbox(b8'(i));
      isb_t[sb_t[i]] = b8'(i);
    end
  endfunction

  function automatic mat_t to_mat(logic [127:0] v);
    mat_t m;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        m[r][c] = v[127 - 8*(4*c + r) -: 8];
    return m;
  endfunction

  function automatic logic [127:0] from_mat(mat_t m);
    logic [127:0] v;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        v[127 - 8*(4*c + r) -: 8] = m[r][c];
    return v;
  endfunction

  function automatic logic [127:0] r_shift_rows(logic [127:0] v, bit inverse);
    mat_t a = to_mat(v), o;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        if (!inverse) o[r][c] = a[r][(c + r) % 4];
        else          o[r][(c + r) % 4] = a[r][c];
    return from_mat(o);
  endfunction

  function automatic logic [127:0] r_mix(logic [127:0] v, bit inverse);
    mat_t a = to_mat(v), o;
    b8 m [4];
    m = inverse ? '{8'd14, 8'd11, 8'd13, 8'd9} : '{8'd2, 8'd3, 8'd1, 8'd1};
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) begin
        o[r][c] = 0;
        for (int k = 0; k < 4; k++) o[r][c] ^= gf_mul(m[(k - r + 4) % 4], a[k][c]);
      end
    return from_mat(o);
  endfunction

  function automatic logic [127:0] r_subbytes(logic [127:0] v, logic [127:0] k, bit modified, bit inverse);
    mat_t a = to_mat(v), km = to_mat(k), o;
    for (int r = 0; r < 4; r++) begin
      b8 x = modified ? (km[r][0] ^ km[r][1] ^ km[r][2] ^ km[r][3]) : 8'h00;
      for (int c = 0; c < 4; c++)
        o[r][c] = inverse ? (isb_t[a[r][c]] ^ x) : sb_t[a[r][c] ^ x];
    end
    return from_mat(o);
  endfunction

  function automatic logic [127:0] r_modarith(logic [127:0] v, logic [127:0] k, bit sub);
    logic [127:0] o;
    for (int n = 0; n < 16; n++)
      o[8*n +: 8] = sub ? v[8*n +: 8] - k[8*n +: 8] : v[8*n +: 8] + k[8*n +: 8];
    return o;
  endfunction

  function automatic logic [31:0] r_subword(logic [31:0] w);
    return {sb_t[w[31:24]], sb_t[w[23:16]], sb_t[w[15:8]], sb_t[w[7:0]]};
  endfunction

  // Key pre-processing of the modified cipher: S-box on every key byte, then
  // round constant 01 into the top byte of every word.
  function automatic logic [255:0] r_key_pre(logic [255:0] key);
    logic [255:0] o;
    for (int i = 0; i < 8; i++) o[32*i +: 32] = r_subword(key[32*i +: 32]) ^ 32'h0100_0000;
    return o;
  endfunction

  // Round keys rk[0..14], standard AES-256 word schedule on the (optionally
  // pre-processed) key.
  function automatic void r_expand(logic [255:0] key, bit modified, output logic [127:0] rk [15]);
    logic [31:0] w [60];
    logic [31:0] t;
    b8 rc = 8'h01;
    logic [255:0] k = modified ? r_key_pre(key) : key;
    for (int i = 0; i < 8; i++) w[i] = k[255 - 32*i -: 32];
    for (int i = 8; i < 60; i++) begin
      t = w[i-1];
      if (i % 8 == 0) begin
        t = r_subword({t[23:0], t[31:24]}) ^ {rc, 24'h0};
        rc = gf_mul(rc, 8'h02);
      end else if (i % 8 == 4) t = r_subword(t);
      w[i] = w[i-8] ^ t;
    end
    for (int r = 0; r < 15; r++) rk[r] = {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
  endfunction

  // State after round `upto` (0..14) of encryption; upto = 14 is the ciphertext.
  function automatic logic [127:0] r_encrypt(logic [127:0] pt, logic [255:0] key,
                                             bit modified, int upto = 14);
    logic [127:0] rk [15];
    logic [127:0] s;
    r_expand(key, modified, rk);
    s = pt ^ rk[0];
    for (int r = 1; r <= upto; r++) begin
      s = r_subbytes(s, rk[r], modified, 0);
      if (r < 14) begin
        if (modified) s ^= rk[r];
        s = r_shift_rows(s, 0);
        if (modified) s = r_modarith(s, rk[r], 0);
        s = r_mix(s, 0);
      end else begin
        if (modified) s = r_modarith(s, rk[r], 0);
        s = r_shift_rows(s, 0);
      end
      s ^= rk[r];
    end
    return s;
  endfunction

  function automatic logic [127:0] rand128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  function automatic logic [255:0] rand256();
    return {rand128(), rand128()};
  endfunction

endpackage
