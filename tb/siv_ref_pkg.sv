// siv_ref_pkg: software reference models used by the testbenches.
//
// Written independently of the RTL and in a different style: AES works on a
// byte array with a lookup table it builds itself by brute-force inversion,
// the GCM product is the textbook shift-and-add, and POLYVAL is computed
// straight from its definition (little-endian polynomials, modulus
// x^128+x^127+x^126+x^121+1, product times x^-128) rather than through GHASH.
// aead_siv() is the whole AES-GCM-SIV encryption of RFC 8452 for AES-128.
// Each testbench also checks these models against published test vectors.
package siv_ref_pkg;

  typedef logic [127:0] blk_t;
  typedef byte unsigned bytes_t[];

  function automatic byte unsigned gm(byte unsigned a, byte unsigned b);
    byte unsigned p = 0;
    for (int i = 0; i < 8; i++) begin
      if (b & 1) p ^= a;
      b = b >> 1;
      a = (a & 8'h80) ? byte'((a << 1) ^ 8'h1b) : byte'(a << 1);
    end
    return p;
  endfunction

  function automatic byte unsigned sbox(byte unsigned x);
    byte unsigned inv = 0, y;
    for (int c = 1; c < 256; c++) if (gm(x, byte'(c)) == 1) inv = byte'(c);
    y = inv;
    for (int k = 1; k <= 4; k++) y ^= byte'((inv << k) | (inv >> (8 - k)));
    return y ^ 8'h63;
  endfunction

  function automatic blk_t aes128(blk_t key, blk_t pt);
    byte unsigned s[16], t[16], w[176], sb[256];
    byte unsigned rc = 1;
    for (int i = 0; i < 256; i++) sb[i] = sbox(byte'(i));
    for (int i = 0; i < 16; i++) begin
      w[i] = key[127-8*i -: 8];
      s[i] = pt[127-8*i -: 8];
    end
    for (int i = 16; i < 176; i += 4) begin
      byte unsigned q[4];
      for (int j = 0; j < 4; j++) q[j] = w[i-4+j];
      if (i % 16 == 0) begin
        byte unsigned q0 = q[0];
        q[0] = sb[q[1]] ^ rc; q[1] = sb[q[2]]; q[2] = sb[q[3]]; q[3] = sb[q0];
        rc = gm(rc, 2);
      end
      for (int j = 0; j < 4; j++) w[i+j] = w[i-16+j] ^ q[j];
    end
    for (int i = 0; i < 16; i++) s[i] ^= w[i];
    for (int r = 1; r <= 10; r++) begin
      for (int i = 0; i < 16; i++) t[i] = sb[s[(i + 4*(i%4)) % 16]];
      for (int c = 0; c < 4; c++) begin
        byte unsigned a[4];
        for (int j = 0; j < 4; j++) a[j] = t[4*c+j];
        if (r != 10)
          for (int j = 0; j < 4; j++)
            t[4*c+j] = gm(a[j],2) ^ gm(a[(j+1)%4],3) ^ a[(j+2)%4] ^ a[(j+3)%4];
      end
      for (int i = 0; i < 16; i++) s[i] = t[i] ^ w[16*r + i];
    end
    for (int i = 0; i < 16; i++) aes128[127-8*i -: 8] = s[i];
  endfunction

  // GCM multiplication (NIST SP 800-38D, Algorithm 1).
  function automatic blk_t gcm_mul(blk_t x, blk_t y);
    blk_t z = 0, v = y;
    for (int i = 0; i < 128; i++) begin
      if (x[127-i]) z ^= v;
      v = v[0] ? ((v >> 1) ^ {8'hE1, 120'h0}) : (v >> 1);
    end
    return z;
  endfunction

  // Little-endian integer of a 16-byte block (byte 0 least significant).
  function automatic blk_t le(blk_t b);
    blk_t r;
    for (int i = 0; i < 16; i++) r[8*i +: 8] = b[127-8*i -: 8];
    return r;
  endfunction

  // POLYVAL dot(a, b) = a * b * x^-128 mod P, on blocks in RFC byte order.
  function automatic blk_t dot(blk_t a, blk_t b);
    logic [255:0] prod = 0;
    logic [128:0] pm = {1'b1, 1'b1, 1'b1, 4'b0, 1'b1, 120'b0, 1'b1};
    blk_t ai = le(a), bi = le(b);
    for (int i = 0; i < 128; i++) if (bi[i]) prod ^= (256'(ai) << i);
    for (int i = 255; i >= 128; i--) if (prod[i]) prod ^= (256'(pm) << (i - 128));
    for (int k = 0; k < 128; k++) begin
      if (prod[0]) prod ^= 256'(pm);
      prod = prod >> 1;
    end
    return le(prod[127:0]);
  endfunction

  function automatic blk_t get_blk(bytes_t d, int idx);
    blk_t r = 0;
    for (int i = 0; i < 16; i++)
      if (16*idx + i < d.size()) r[127-8*i -: 8] = d[16*idx + i];
    return r;
  endfunction

  // AES-GCM-SIV (AES-128) encryption: returns ciphertext blocks and tag.
  function automatic void aead_siv(blk_t key, logic [95:0] nonce, bytes_t ad,
                                   bytes_t pt, ref blk_t ct[$], ref blk_t tag);
    blk_t ak, ek, s, ctr, lenb, k0, k1, k2, k3;
    int nad = (ad.size() + 15) / 16, npt = (pt.size() + 15) / 16;
    k0 = aes128(key, {8'd0, 24'd0, nonce});
    k1 = aes128(key, {8'd1, 24'd0, nonce});
    k2 = aes128(key, {8'd2, 24'd0, nonce});
    k3 = aes128(key, {8'd3, 24'd0, nonce});
    ak = {k0[127:64], k1[127:64]};
    ek = {k2[127:64], k3[127:64]};
    s = 0;
    for (int i = 0; i < nad; i++) s = dot(s ^ get_blk(ad, i), ak);
    for (int i = 0; i < npt; i++) s = dot(s ^ get_blk(pt, i), ak);
    lenb = 0;
    for (int i = 0; i < 8; i++) begin
      lenb[127-8*i -: 8] = byte'((64'(ad.size()) * 8) >> (8*i));
      lenb[63-8*i -: 8]  = byte'((64'(pt.size()) * 8) >> (8*i));
    end
    s = dot(s ^ lenb, ak);
    s[127:32] ^= nonce;
    s[7] = 1'b0;
    tag = aes128(ek, s);
    ctr = tag;
    ctr[7] = 1'b1;
    ct.delete();
    for (int i = 0; i < npt; i++) begin
      blk_t ks = aes128(ek, ctr), c;
      logic [31:0] cnt;
      c = get_blk(pt, i) ^ ks;
      for (int j = 0; j < 16; j++) if (16*i + j >= pt.size()) c[127-8*j -: 8] = 0;
      ct.push_back(c);
      cnt = {ctr[103:96], ctr[111:104], ctr[119:112], ctr[127:120]} + 1;
      ctr[127:96] = {cnt[7:0], cnt[15:8], cnt[23:16], cnt[31:24]};
    end
  endfunction

endpackage
