// keccak_ref_pkg - bit-level reference model of Keccak-f[1600] and of the
// sponge, used by the testbenches to compute expected values.
//
// It is written independently of the RTL: the state is a flat 1600-bit
// vector addressed bit by bit (x,y,z -> 64*(5y+x)+z), the rotation offsets
// are generated by the (t+1)(t+2)/2 walk over the lanes, the round constants
// by the 8-bit LFSR x^8+x^6+x^5+x^4+1, and pi is applied in its inverse form
// A'[x,y] = A[x+3y, x].
package keccak_ref_pkg;

  typedef logic [1599:0] flat_t;
  typedef logic [63:0]   word64_t;
  typedef byte unsigned  bytes_t[$];

  function automatic int unsigned bi(int x, int y, int z);
    return 64 * (5 * (((y % 5) + 5) % 5) + (((x % 5) + 5) % 5)) + (((z % 64) + 64) % 64);
  endfunction

  function automatic flat_t ref_theta(flat_t a);
    logic [63:0] c [5];
    flat_t r;
    for (int x = 0; x < 5; x++)
      for (int z = 0; z < 64; z++)
        c[x][z] = a[bi(x,0,z)] ^ a[bi(x,1,z)] ^ a[bi(x,2,z)] ^ a[bi(x,3,z)] ^ a[bi(x,4,z)];
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++)
        for (int z = 0; z < 64; z++)
          r[bi(x,y,z)] = a[bi(x,y,z)] ^ c[(x+4)%5][z] ^ c[(x+1)%5][(z+63)%64];
    return r;
  endfunction

  function automatic int ref_rho_offset(int x0, int y0);
    int x = 1, y = 0, t;
    if (x0 == 0 && y0 == 0) return 0;
    for (t = 0; t < 24; t++) begin
      int nx;
      if (x == x0 && y == y0) return ((t + 1) * (t + 2) / 2) % 64;
      nx = y;
      y  = (2 * x + 3 * y) % 5;
      x  = nx;
    end
    return -1;
  endfunction

  function automatic flat_t ref_rho(flat_t a);
    flat_t r;
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++)
        for (int z = 0; z < 64; z++)
          r[bi(x,y,z)] = a[bi(x,y,z - ref_rho_offset(x,y))];
    return r;
  endfunction

  function automatic flat_t ref_pi(flat_t a);
    flat_t r;
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++)
        for (int z = 0; z < 64; z++)
          r[bi(x,y,z)] = a[bi(x + 3*y, x, z)];
    return r;
  endfunction

  function automatic flat_t ref_chi(flat_t a);
    flat_t r;
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++)
        for (int z = 0; z < 64; z++)
          r[bi(x,y,z)] = a[bi(x,y,z)] ^ ((a[bi(x+1,y,z)] ^ 1'b1) & a[bi(x+2,y,z)]);
    return r;
  endfunction

  function automatic bit lfsr_rc(int t);
    int unsigned r = 1;
    if (t % 255 == 0) return 1'b1;
    for (int i = 1; i <= t % 255; i++) begin
      r = r << 1;
      if (r & 32'h100) r = r ^ 32'h171;
    end
    return r[0];
  endfunction

  function automatic word64_t ref_rc(int ir);
    word64_t rc = '0;
    for (int j = 0; j <= 6; j++)
      rc[(1 << j) - 1] = lfsr_rc(j + 7 * ir);
    return rc;
  endfunction

  function automatic flat_t ref_iota(flat_t a, word64_t rc);
    flat_t r = a;
    for (int z = 0; z < 64; z++) r[bi(0,0,z)] = a[bi(0,0,z)] ^ rc[z];
    return r;
  endfunction

  function automatic flat_t ref_round(flat_t a, int ir);
    return ref_iota(ref_chi(ref_pi(ref_rho(ref_theta(a)))), ref_rc(ir));
  endfunction

  function automatic flat_t ref_permute(flat_t a);
    flat_t s = a;
    for (int ir = 0; ir < 24; ir++) s = ref_round(s, ir);
    return s;
  endfunction

  // Padded message as a list of rate-sized blocks (bytes, little-endian).
  function automatic int ref_num_blocks(int msg_len, int rate_bits);
    return msg_len / (rate_bits / 8) + 1;
  endfunction

  function automatic flat_t ref_block(bytes_t msg, int rate_bits, byte unsigned pad, int k);
    flat_t blk = '0;
    int rb = rate_bits / 8;
    int n = msg.size();
    int nblk = ref_num_blocks(n, rate_bits);
    for (int i = 0; i < rb; i++) begin
      int p = k * rb + i;
      byte unsigned v = 0;
      if (p < n) v = msg[p];
      else if (p == n) v = pad;
      if (k == nblk - 1 && i == rb - 1) v = v | 8'h80;
      blk[8*i +: 8] = v;
    end
    return blk;
  endfunction

  // Sponge hash: returns the whole state after the last permutation; the
  // digest is its first out_bits bits.
  function automatic flat_t ref_sponge(bytes_t msg, int rate_bits, byte unsigned pad);
    flat_t s = '0;
    int nblk = ref_num_blocks(msg.size(), rate_bits);
    for (int k = 0; k < nblk; k++)
      s = ref_permute(s ^ ref_block(msg, rate_bits, pad, k));
    return s;
  endfunction

  // Squeezed output of out_bits bits (up to 4096): first rate block in the
  // low bits, one more permutation per further rate block.
  function automatic logic [4095:0] ref_squeeze(bytes_t msg, int rate_bits, byte unsigned pad,
                                                int out_bits);
    logic [4095:0] z = '0;
    flat_t s = ref_sponge(msg, rate_bits, pad);
    int got = 0;
    while (got < out_bits) begin
      for (int i = 0; i < rate_bits && got + i < 4096; i++) z[got + i] = s[i];
      got += rate_bits;
      if (got < out_bits) s = ref_permute(s);
    end
    for (int i = out_bits; i < 4096; i++) z[i] = 1'b0;
    return z;
  endfunction

endpackage
