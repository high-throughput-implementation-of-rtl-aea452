// sha512_ref_pkg: reference model of SHA-512 for the testbenches.
//
// Written from the Secure Hash Standard in its plain one-round-per-step form,
// independently of the RTL: it computes its own round constants and initial
// hash value from the primes (integer cube and square roots), its own
// message schedule and padding. State words are packed A..H with A in bits
// 511:448, the same order as the digest.
package sha512_ref_pkg;

  typedef logic [63:0]  w64_t;
  typedef logic [511:0] st512_t;

  function automatic w64_t r_rotr(w64_t x, int n);
    logic [127:0] xx;
    xx = {x, x} >> n;
    return xx[63:0];
  endfunction

  function automatic w64_t r_S0(w64_t x); return r_rotr(x,28) ^ r_rotr(x,34) ^ r_rotr(x,39); endfunction
  function automatic w64_t r_S1(w64_t x); return r_rotr(x,14) ^ r_rotr(x,18) ^ r_rotr(x,41); endfunction
  function automatic w64_t r_s0(w64_t x); return r_rotr(x,1) ^ r_rotr(x,8) ^ (x >> 7); endfunction
  function automatic w64_t r_s1(w64_t x); return r_rotr(x,19) ^ r_rotr(x,61) ^ (x >> 6); endfunction
  function automatic w64_t r_ch(w64_t x, w64_t y, w64_t z); return (x & y) | (~x & z); endfunction
  function automatic w64_t r_maj(w64_t x, w64_t y, w64_t z); return (x & y) | (z & (x | y)); endfunction

  // n-th prime, n = 0, 1, ...
  function automatic int r_prime(int n);
    int cnt, p;
    bit isp;
    cnt = -1;
    p = 1;
    while (cnt < n) begin
      p++;
      isp = 1;
      for (int d = 2; d * d <= p; d++)
        if (p % d == 0) isp = 0;
      if (isp) cnt++;
    end
    return p;
  endfunction

  // floor(cbrt(p * 2^192)) mod 2^64: first 64 fraction bits of cbrt(p)
  function automatic w64_t r_k(int i);
    logic [255:0] n, r, t;
    n = 256'(r_prime(i)) << 192;
    r = '0;
    for (int b = 70; b >= 0; b--) begin
      t = r | (256'd1 << b);
      if (t * t * t <= n) r = t;
    end
    return r[63:0];
  endfunction

  // floor(sqrt(p * 2^128)) mod 2^64: first 64 fraction bits of sqrt(p)
  function automatic w64_t r_iv(int i);
    logic [255:0] n, r, t;
    n = 256'(r_prime(i)) << 128;
    r = '0;
    for (int b = 70; b >= 0; b--) begin
      t = r | (256'd1 << b);
      if (t * t <= n) r = t;
    end
    return r[63:0];
  endfunction

  function automatic st512_t r_iv_state();
    st512_t s;
    for (int i = 0; i < 8; i++) s[511-64*i -: 64] = r_iv(i);
    return s;
  endfunction

  // One plain SHA-512 round.
  function automatic st512_t r_round(st512_t s, w64_t w, w64_t k);
    w64_t a, b, c, d, e, f, g, h, t1, t2;
    {a, b, c, d, e, f, g, h} = s;
    t1 = h + r_S1(e) + r_ch(e, f, g) + k + w;
    t2 = r_S0(a) + r_maj(a, b, c);
    return {t1 + t2, a, b, c, d + t1, e, f, g};
  endfunction

  // Schedule word t of a 1024-bit block.
  function automatic w64_t r_sched(logic [1023:0] blk, int t);
    w64_t w [80];
    for (int j = 0; j < 80; j++) begin
      if (j < 16) w[j] = blk[1023-64*j -: 64];
      else        w[j] = r_s1(w[j-2]) + w[j-7] + r_s0(w[j-15]) + w[j-16];
    end
    return w[t];
  endfunction

  // Compression of one block: returns the working variables after 80 rounds
  // (before the feed-forward addition).
  function automatic st512_t r_compress(st512_t s, logic [1023:0] blk);
    w64_t w [80];
    for (int j = 0; j < 80; j++) begin
      if (j < 16) w[j] = blk[1023-64*j -: 64];
      else        w[j] = r_s1(w[j-2]) + w[j-7] + r_s0(w[j-15]) + w[j-16];
    end
    for (int j = 0; j < 80; j++) s = r_round(s, w[j], r_k(j));
    return s;
  endfunction

  function automatic st512_t r_add(st512_t x, st512_t y);
    st512_t z;
    for (int i = 0; i < 8; i++) z[511-64*i -: 64] = x[511-64*i -: 64] + y[511-64*i -: 64];
    return z;
  endfunction

  // Number of padded blocks for a message of len bytes.
  function automatic int r_nblocks(int len);
    return (len + 17 + 127) / 128;
  endfunction

  // Padded block number bi of a message.
  function automatic logic [1023:0] r_block(byte unsigned msg[$], int bi);
    logic [1023:0] blk;
    int len, nb, pos;
    longint unsigned bits;
    len  = msg.size();
    nb   = r_nblocks(len);
    bits = 64'(len) * 8;
    blk  = '0;
    for (int i = 0; i < 128; i++) begin
      pos = bi * 128 + i;
      if (pos < len)       blk[1023-8*i -: 8] = msg[pos];
      else if (pos == len) blk[1023-8*i -: 8] = 8'h80;
      if (bi == nb - 1 && i >= 120) blk[1023-8*i -: 8] = bits[63-8*(i-120) -: 8];
    end
    return blk;
  endfunction

  function automatic st512_t r_sha512(byte unsigned msg[$]);
    st512_t hv;
    hv = r_iv_state();
    for (int bi = 0; bi < r_nblocks(msg.size()); bi++)
      hv = r_add(hv, r_compress(hv, r_block(msg, bi)));
    return hv;
  endfunction

endpackage
