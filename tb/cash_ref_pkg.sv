// cash_ref_pkg - reference model of CASH for the testbenches, written
// directly from the algorithm rather than from the RTL structure:
// polynomial products are formed in full and reduced by long division, the
// permutation and the sponge are plain loops over bit vectors, and the
// message is padded as a bit string M || 1 || 0*.
//
// Conventions shared with the RTL: bit i of an MPR state is the coefficient
// of x^i; the product is reduced by the reciprocal of the listed P(x); the
// state is {M107, M61, M19, M3, M2}; the key fragments are U107 = K[127:23]
// and U61 = K[22:0]; the first message bit is the top bit of a block.
package cash_ref_pkg;

  typedef logic [191:0] st_t;
  typedef logic [127:0] k_t;
  typedef logic [255:0] dg_t;

  // U(x) * A(x) mod reciprocal(P(x)), n <= 127; p holds bits 0..n.
  function automatic logic [127:0] mulmod(logic [127:0] a, logic [127:0] u,
                                          logic [127:0] p, int n);
    logic [255:0] prod;
    logic [127:0] pr;
    pr = '0;
    for (int i = 0; i <= n; i++) pr[i] = p[n - i];
    prod = '0;
    for (int i = 0; i < n; i++) if (u[i]) prod ^= 256'(a) << i;
    for (int d = 2 * n - 2; d >= n; d--) if (prod[d]) prod ^= 256'(pr) << (d - n);
    for (int i = n; i < 128; i++) prod[i] = 1'b0;
    return prod[127:0];
  endfunction

  function automatic logic [127:0] chain(logic [127:0] s, int ns, int nt);
    logic [127:0] c;
    c = '0;
    for (int j = 0; j < nt; j++) begin
      int b;
      b = (j * ns) / nt;
      if (ns >= 7)
        c[j] = s[b % ns] ^ s[(b + 1) % ns] ^ s[(b + 2) % ns] ^
               (s[(b + 3) % ns] & s[(b + 4) % ns] & s[(b + 5) % ns] & s[(b + 6) % ns]);
      else
        c[j] = s[b % ns] ^ (s[(b + 1) % ns] & s[(b + 2) % ns]);
    end
    return c;
  endfunction

  function automatic st_t next_state(st_t s, k_t key);
    logic [127:0] m107, m61, m19, m3, m2;
    logic [127:0] p107, p61, p19, p3, p2;
    logic [127:0] n107, n61, n19, n3, n2;
    m107 = 128'(s[191:85]);
    m61  = 128'(s[84:24]);
    m19  = 128'(s[23:5]);
    m3   = 128'(s[4:2]);
    m2   = 128'(s[1:0]);
    p107 = '0; p107[107] = 1; p107[59] = 1; p107[54] = 1; p107[39] = 1; p107[0] = 1;
    p61  = '0; p61[61] = 1;   p61[44] = 1;  p61[19] = 1;  p61[15] = 1;  p61[0] = 1;
    p19  = '0; p19[19] = 1;   p19[5] = 1;   p19[2] = 1;   p19[1] = 1;   p19[0] = 1;
    p3   = 128'b1011;
    p2   = 128'b111;
    n107 = mulmod(m107, 128'(key[127:23]), p107, 107);
    n61  = mulmod(m61,  128'(key[22:0]),   p61,  61) ^ chain(m107, 107, 61);
    n19  = mulmod(m19,  (128'(1) << 17) | 128'(1), p19, 19) ^ chain(m61, 61, 19);
    n3   = mulmod(m3,   128'b110, p3, 3) ^ chain(m19, 19, 3);
    n2   = mulmod(m2,   128'b11,  p2, 2) ^ chain(m3, 3, 2);
    return {n107[106:0], n61[60:0], n19[18:0], n3[2:0], n2[1:0]};
  endfunction

  function automatic st_t permute(st_t s, k_t key);
    for (int j = 0; j < 4; j++) begin
      for (int i = 0; i < 8; i++) s = next_state(s, key);
      if (j != 3) s = {s[95:0], s[191:96]};
    end
    return s;
  endfunction

  // Keyed sponge over a message of nbits bits (msg[0] is the first bit),
  // absorbing bw-bit blocks (192 or 64) into the low bw bits of the state.
  function automatic dg_t mac(bit msg[], k_t key, int bw);
    bit   padded[$];
    st_t  s;
    dg_t  h;
    foreach (msg[i]) padded.push_back(msg[i]);
    padded.push_back(1'b1);
    while (padded.size() % bw != 0) padded.push_back(1'b0);
    s = '1;
    s = permute(s, key);
    for (int b = 0; b < padded.size() / bw; b++) begin
      st_t blk;
      blk = '0;
      for (int i = 0; i < bw; i++) blk[bw - 1 - i] = padded[b * bw + i];
      s ^= blk;
      s = permute(s, key);
    end
    h = '0;
    for (int i = 0; i < 4; i++) begin
      s = permute(s, key);
      h = {h[191:0], s[63:0]};
    end
    return h;
  endfunction

endpackage
