// keccak_ref_pkg: software reference of Keccak used by the testbenches.
//
// Written independently of the RTL: the round constants and rho offsets are
// the published Keccak tables typed in, and the state is a 5x5 array indexed
// [x][y]. Provides the five step mappings, the full permutation and a sponge
// hash over a byte queue with a selectable rate and padding byte.
package keccak_ref_pkg;

  typedef logic [63:0] ln_t;
  typedef ln_t st_t [5][5];  // [x][y]
  typedef logic [7:0] byte_q_t[$];

  localparam ln_t RC [24] = '{
    64'h0000000000000001, 64'h0000000000008082, 64'h800000000000808A, 64'h8000000080008000,
    64'h000000000000808B, 64'h0000000080000001, 64'h8000000080008081, 64'h8000000000008009,
    64'h000000000000008A, 64'h0000000000000088, 64'h0000000080008009, 64'h000000008000000A,
    64'h000000008000808B, 64'h800000000000008B, 64'h8000000000008089, 64'h8000000000008003,
    64'h8000000000008002, 64'h8000000000000080, 64'h000000000000800A, 64'h800000008000000A,
    64'h8000000080008081, 64'h8000000000008080, 64'h0000000080000001, 64'h8000000080008008};

  // rho offsets, ROT[x][y]
  localparam int ROT [5][5] = '{
    '{ 0, 36,  3, 41, 18},
    '{ 1, 44, 10, 45,  2},
    '{62,  6, 43, 15, 61},
    '{28, 55, 25, 21, 56},
    '{27, 20, 39,  8, 14}};

  function automatic ln_t rol(ln_t v, int n);
    if (n == 0) return v;
    return (v << n) | (v >> (64 - n));
  endfunction

  function automatic st_t theta(st_t a);
    ln_t c[5]; st_t r;
    for (int x = 0; x < 5; x++) c[x] = a[x][0] ^ a[x][1] ^ a[x][2] ^ a[x][3] ^ a[x][4];
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++)
        r[x][y] = a[x][y] ^ c[(x+4)%5] ^ rol(c[(x+1)%5], 1);
    return r;
  endfunction

  function automatic st_t rho(st_t a);
    st_t r;
    for (int x = 0; x < 5; x++) for (int y = 0; y < 5; y++) r[x][y] = rol(a[x][y], ROT[x][y]);
    return r;
  endfunction

  function automatic st_t pi(st_t a);
    st_t r;
    for (int x = 0; x < 5; x++) for (int y = 0; y < 5; y++) r[y][(2*x+3*y)%5] = a[x][y];
    return r;
  endfunction

  function automatic st_t chi(st_t a);
    st_t r;
    for (int x = 0; x < 5; x++) for (int y = 0; y < 5; y++)
      r[x][y] = a[x][y] ^ (~a[(x+1)%5][y] & a[(x+2)%5][y]);
    return r;
  endfunction

  function automatic st_t iota(st_t a, int rnd);
    st_t r = a;
    r[0][0] = a[0][0] ^ RC[rnd];
    return r;
  endfunction

  function automatic st_t round_f(st_t a, int rnd);
    return iota(chi(pi(rho(theta(a)))), rnd);
  endfunction

  function automatic st_t permute(st_t a);
    st_t s = a;
    for (int i = 0; i < 24; i++) s = round_f(s, i);
    return s;
  endfunction

  // flat 1600-bit vector, lane x+5y at bits 64*(x+5y)
  function automatic logic [1599:0] to_flat(st_t a);
    logic [1599:0] f;
    for (int x = 0; x < 5; x++) for (int y = 0; y < 5; y++) f[64*(x+5*y) +: 64] = a[x][y];
    return f;
  endfunction

  function automatic st_t from_flat(logic [1599:0] f);
    st_t a;
    for (int x = 0; x < 5; x++) for (int y = 0; y < 5; y++) a[x][y] = f[64*(x+5*y) +: 64];
    return a;
  endfunction

  function automatic logic [1599:0] rand_flat();
    logic [1599:0] f;
    for (int i = 0; i < 50; i++) f[32*i +: 32] = $urandom;
    return f;
  endfunction

  // Sponge hash; returns the first nout bytes of the squeezed output.
  function automatic byte_q_t hash(byte_q_t msg, int rate_bytes, logic [7:0] pad, int nout);
    byte_q_t m = msg;
    byte_q_t out;
    st_t s;
    logic [1599:0] f;
    int nblk;
    m.push_back(pad);
    while (m.size() % rate_bytes != 0) m.push_back(8'h00);
    m[m.size()-1] = m[m.size()-1] ^ 8'h80;
    for (int x = 0; x < 5; x++) for (int y = 0; y < 5; y++) s[x][y] = '0;
    nblk = m.size() / rate_bytes;
    for (int b = 0; b < nblk; b++) begin
      f = to_flat(s);
      for (int k = 0; k < rate_bytes; k++) f[8*k +: 8] = f[8*k +: 8] ^ m[b*rate_bytes + k];
      s = permute(from_flat(f));
    end
    f = to_flat(s);
    for (int k = 0; k < nout; k++) out.push_back(f[8*k +: 8]);
    return out;
  endfunction

endpackage
