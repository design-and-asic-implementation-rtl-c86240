// rijndael_ref_pkg: behavioural reference model of the modified Rijndael
// cipher, used by the testbenches to work out expected values.
//
// It shares no code with the RTL: the S-box is computed from GF(2^8) arithmetic
// (multiplicative inverse by exponentiation, then the Rijndael affine map) and
// the triple-substitution S-box is that S-box applied three times; its inverse
// is found by inverting the table. ShiftRow, MixColumn, the key schedule and the
// full cipher are written over a byte array st[r + 4c] in plain loops.
// Call ref_init() once before using any other function.
package rijndael_ref_pkg;

  typedef logic [7:0] rbyte_t;
  typedef rbyte_t     rstate_t [16];
  typedef logic [127:0] rkeys_t [11];

  rbyte_t s_tab   [256];
  rbyte_t s3_tab  [256];
  rbyte_t is3_tab [256];

  function automatic rbyte_t gmul(rbyte_t a, rbyte_t b);
    rbyte_t p = 0;
    for (int i = 0; i < 8; i++) begin
      if (b[0]) p ^= a;
      a = a[7] ? ({a[6:0], 1'b0} ^ 8'h1b) : {a[6:0], 1'b0};
      b = b >> 1;
    end
    return p;
  endfunction

  function automatic rbyte_t ginv(rbyte_t a);
    rbyte_t r = 1;
    if (a == 0) return 0;
    for (int i = 0; i < 254; i++) r = gmul(r, a);
    return r;
  endfunction

  function automatic rbyte_t rotl8(rbyte_t x, int n);
    return rbyte_t'((x << n) | (x >> (8 - n)));
  endfunction

  function automatic void ref_init();
    for (int x = 0; x < 256; x++) begin
      rbyte_t b = ginv(rbyte_t'(x));
      s_tab[x] = b ^ rotl8(b, 1) ^ rotl8(b, 2) ^ rotl8(b, 3) ^ rotl8(b, 4) ^ 8'h63;
    end
    for (int x = 0; x < 256; x++) begin
      s3_tab[x] = s_tab[s_tab[s_tab[x]]];
      is3_tab[s_tab[s_tab[s_tab[x]]]] = rbyte_t'(x);
    end
  endfunction

  function automatic rstate_t to_st(logic [127:0] v);
    rstate_t s;
    for (int i = 0; i < 16; i++) s[i] = v[127 - 8*i -: 8];
    return s;
  endfunction

  function automatic logic [127:0] from_st(rstate_t s);
    logic [127:0] v;
    for (int i = 0; i < 16; i++) v[127 - 8*i -: 8] = s[i];
    return v;
  endfunction

  // Offsets of the two ShiftRow modes, rows 0..3
  function automatic int ref_off(bit mode, int r);
    int m1 [4] = '{1, 3, 0, 2};
    int m0 [4] = '{2, 0, 3, 1};
    return mode ? m1[r] : m0[r];
  endfunction

  function automatic logic [127:0] ref_shift(logic [127:0] v, bit mode, bit inverse);
    rstate_t s = to_st(v), o;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        if (!inverse) o[r + 4*c] = s[r + 4*((c + ref_off(mode, r)) % 4)];
        else          o[r + 4*((c + ref_off(mode, r)) % 4)] = s[r + 4*c];
    return from_st(o);
  endfunction

  function automatic logic [127:0] ref_mix_generic(logic [127:0] v, rbyte_t m0, rbyte_t m1, rbyte_t m2, rbyte_t m3);
    rstate_t s = to_st(v), o;
    rbyte_t m [4] = '{m0, m1, m2, m3};
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) begin
        o[r + 4*c] = 0;
        for (int k = 0; k < 4; k++) o[r + 4*c] ^= gmul(m[(k - r + 4) % 4], s[k + 4*c]);
      end
    return from_st(o);
  endfunction

  function automatic logic [127:0] ref_mix(logic [127:0] v);
    return ref_mix_generic(v, 8'h02, 8'h03, 8'h01, 8'h01);
  endfunction

  function automatic logic [127:0] ref_inv_mix(logic [127:0] v);
    return ref_mix_generic(v, 8'h0e, 8'h0b, 8'h0d, 8'h09);
  endfunction

  function automatic logic [127:0] ref_sub(logic [127:0] v, bit inverse);
    rstate_t s = to_st(v);
    for (int i = 0; i < 16; i++) s[i] = inverse ? is3_tab[s[i]] : s3_tab[s[i]];
    return from_st(s);
  endfunction

  function automatic rkeys_t ref_expand(logic [127:0] key);
    logic [31:0] w [44];
    rkeys_t k;
    rbyte_t rc = 8'h01;
    for (int i = 0; i < 4; i++) w[i] = key[127 - 32*i -: 32];
    for (int i = 4; i < 44; i++) begin
      logic [31:0] t = w[i-1];
      if (i % 4 == 0) begin
        t = {t[23:0], t[31:24]};
        t = {s3_tab[t[31:24]], s3_tab[t[23:16]], s3_tab[t[15:8]], s3_tab[t[7:0]]};
        t ^= {rc, 24'h0};
        rc = gmul(rc, 8'h02);
      end
      w[i] = w[i-4] ^ t;
    end
    for (int r = 0; r < 11; r++) k[r] = {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
    return k;
  endfunction

  function automatic logic [127:0] ref_enc(logic [127:0] pt, logic [127:0] key, bit mode);
    rkeys_t k = ref_expand(key);
    logic [127:0] s = pt ^ k[0];
    for (int r = 1; r <= 10; r++) begin
      s = ref_shift(ref_sub(s, 0), mode, 0);
      if (r < 10) s = ref_mix(s);
      s ^= k[r];
    end
    return s;
  endfunction

  function automatic logic [127:0] ref_dec(logic [127:0] ct, logic [127:0] key, bit mode);
    rkeys_t k = ref_expand(key);
    logic [127:0] s = ct ^ k[10];
    for (int r = 9; r >= 0; r--) begin
      s = ref_sub(ref_shift(s, mode, 1), 1) ^ k[r];
      if (r > 0) s = ref_inv_mix(s);
    end
    return s;
  endfunction

  function automatic logic [127:0] rand128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

endpackage
