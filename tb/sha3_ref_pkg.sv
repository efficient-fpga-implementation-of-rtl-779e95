// sha3_ref_pkg: behavioural reference for the testbenches. A plain,
// lane-oriented Keccak-f[1600] and SHA3 sponge written from the standard
// definitions. It does not share tables with the RTL: the rho offsets are
// derived from the (t+1)(t+2)/2 rule and the round constants from the
// degree-8 LFSR x^8 + x^6 + x^5 + x^4 + 1.
package sha3_ref_pkg;

  typedef logic [24:0][63:0] st_t;   // [x + 5y]

  function automatic logic [63:0] rotl(logic [63:0] v, int n);
    n = n % 64;
    if (n == 0) return v;
    return (v << n) | (v >> (64 - n));
  endfunction

  function automatic int rho_ref(int x, int y);
    int cx, cy, t, nx;
    if (x == 0 && y == 0) return 0;
    cx = 1; cy = 0;
    for (t = 0; t < 24; t++) begin
      if (cx == x && cy == y) return ((t + 1) * (t + 2) / 2) % 64;
      nx = cy; cy = (2 * cx + 3 * cy) % 5; cx = nx;
    end
    return 0;
  endfunction

  function automatic logic [63:0] rc_ref(int r);
    logic [63:0] rc;
    logic [7:0]  lfsr;
    rc = '0;
    lfsr = 8'h01;
    for (int i = 0; i < 7 * r; i++)
      lfsr = lfsr[7] ? ((lfsr << 1) ^ 8'h71) : (lfsr << 1);
    for (int j = 0; j < 7; j++) begin
      rc[(1 << j) - 1] = lfsr[0];
      lfsr = lfsr[7] ? ((lfsr << 1) ^ 8'h71) : (lfsr << 1);
    end
    return rc;
  endfunction

  function automatic st_t theta_ref(st_t a);
    logic [4:0][63:0] c;
    st_t o;
    for (int x = 0; x < 5; x++) c[x] = a[x] ^ a[x+5] ^ a[x+10] ^ a[x+15] ^ a[x+20];
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++)
        o[x+5*y] = a[x+5*y] ^ c[(x+4)%5] ^ rotl(c[(x+1)%5], 1);
    return o;
  endfunction

  // rho alone: every lane rotated by its offset
  function automatic st_t rho_st_ref(st_t a);
    st_t o;
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++)
        o[x+5*y] = rotl(a[x+5*y], rho_ref(x, y));
    return o;
  endfunction

  // pi, chi and iota with the constant of round r
  function automatic st_t pci_st_ref(st_t b0, int r);
    st_t b, o;
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++)
        b[y + 5*((2*x + 3*y) % 5)] = b0[x+5*y];
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++)
        o[x+5*y] = b[x+5*y] ^ (~b[(x+1)%5 + 5*y] & b[(x+2)%5 + 5*y]);
    o[0] = o[0] ^ rc_ref(r);
    return o;
  endfunction

  // column parities of slice z
  function automatic logic [4:0] colpar_ref(st_t a, int z);
    logic [4:0] c;
    for (int x = 0; x < 5; x++)
      c[x] = a[x][z] ^ a[x+5][z] ^ a[x+10][z] ^ a[x+15][z] ^ a[x+20][z];
    return c;
  endfunction

  function automatic st_t rand_st();
    st_t s;
    for (int l = 0; l < 25; l++) s[l] = {$urandom, $urandom};
    return s;
  endfunction

  // one full round: iota(chi(pi(rho(theta(a)))))
  function automatic st_t round_ref(st_t a, int r);
    st_t t, b, o;
    t = theta_ref(a);
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++)
        b[y + 5*((2*x + 3*y) % 5)] = rotl(t[x+5*y], rho_ref(x, y));
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++)
        o[x+5*y] = b[x+5*y] ^ (~b[(x+1)%5 + 5*y] & b[(x+2)%5 + 5*y]);
    o[0] = o[0] ^ rc_ref(r);
    return o;
  endfunction

  function automatic st_t keccak_f_ref(st_t a);
    for (int r = 0; r < 24; r++) a = round_ref(a, r);
    return a;
  endfunction

  // SHA3 padding of a message into blocks of rate_bytes bytes
  function automatic void pad_msg(input byte unsigned msg[$], input int rate_bytes,
                                  output byte unsigned blocks[$]);
    int n;
    blocks = msg;
    blocks.push_back(8'h06);
    while (blocks.size() % rate_bytes != 0) blocks.push_back(8'h00);
    n = blocks.size();
    blocks[n-1] = blocks[n-1] | 8'h80;
  endfunction

  // SHA3 digest of msg: rate_bytes = 72 and dig_lanes = 8 for SHA3-512
  function automatic logic [511:0] sha3_ref(input byte unsigned msg[$],
                                            input int rate_bytes, input int dig_lanes);
    byte unsigned p[$];
    st_t s;
    logic [511:0] d;
    pad_msg(msg, rate_bytes, p);
    s = '0;
    for (int b = 0; b < p.size() / rate_bytes; b++) begin
      for (int i = 0; i < rate_bytes; i++)
        s[i/8][8*(i%8) +: 8] = s[i/8][8*(i%8) +: 8] ^ p[b*rate_bytes + i];
      s = keccak_f_ref(s);
    end
    d = '0;
    for (int k = 0; k < dig_lanes; k++) d[64*k +: 64] = s[k];
    return d;
  endfunction

endpackage
