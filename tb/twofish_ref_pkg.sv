// twofish_ref_pkg: behavioural Twofish reference for the testbenches.
//
// Written straight from the cipher's definition and independent of the RTL
// structure: q permutations are evaluated nibble by nibble from their tables
// (kept here as plain arrays), GF(2^8) products by a generic shift-and-add
// loop, additions with the simulator's + operator. Blocks and keys are byte
// strings with byte 0 in the most significant bits.
package twofish_ref_pkg;

  typedef logic [31:0] w32;

  localparam byte unsigned QT0 [4][16] = '{
    '{8'h8,8'h1,8'h7,8'hD,8'h6,8'hF,8'h3,8'h2,8'h0,8'hB,8'h5,8'h9,8'hE,8'hC,8'hA,8'h4},
    '{8'hE,8'hC,8'hB,8'h8,8'h1,8'h2,8'h3,8'h5,8'hF,8'h4,8'hA,8'h6,8'h7,8'h0,8'h9,8'hD},
    '{8'hB,8'hA,8'h5,8'hE,8'h6,8'hD,8'h9,8'h0,8'hC,8'h8,8'hF,8'h3,8'h2,8'h4,8'h7,8'h1},
    '{8'hD,8'h7,8'hF,8'h4,8'h1,8'h2,8'h6,8'hE,8'h9,8'hB,8'h3,8'h0,8'h8,8'h5,8'hC,8'hA}};
  localparam byte unsigned QT1 [4][16] = '{
    '{8'h2,8'h8,8'hB,8'hD,8'hF,8'h7,8'h6,8'hE,8'h3,8'h1,8'h9,8'h4,8'h0,8'hA,8'hC,8'h5},
    '{8'h1,8'hE,8'h2,8'hB,8'h4,8'hC,8'h3,8'h7,8'h6,8'hD,8'hA,8'h5,8'hF,8'h9,8'h0,8'h8},
    '{8'h4,8'hC,8'h7,8'h5,8'h1,8'h6,8'h9,8'hA,8'h0,8'hE,8'hD,8'h8,8'h2,8'hB,8'h3,8'hF},
    '{8'hB,8'h9,8'h5,8'h1,8'hC,8'h3,8'hD,8'hE,8'h6,8'h4,8'h7,8'hF,8'h2,8'h0,8'h8,8'hA}};

  function automatic int ror4(int x);
    return ((x >> 1) | (x << 3)) & 15;
  endfunction

  function automatic byte unsigned ref_q(int sel, byte unsigned x);
    int a, b, ta, tb2;
    a = int'(x) >> 4; b = int'(x) & 15;
    ta = a ^ b; tb2 = a ^ ror4(b) ^ ((8 * a) & 15);
    a = (sel == 0) ? QT0[0][ta] : QT1[0][ta];
    b = (sel == 0) ? QT0[1][tb2] : QT1[1][tb2];
    ta = a ^ b; tb2 = a ^ ror4(b) ^ ((8 * a) & 15);
    a = (sel == 0) ? QT0[2][ta] : QT1[2][ta];
    b = (sel == 0) ? QT0[3][tb2] : QT1[3][tb2];
    return byte'(16 * b + a);
  endfunction

  function automatic byte unsigned gmul(byte unsigned a, byte unsigned b, int poly);
    int r, x;
    r = 0; x = a;
    for (int n = 0; n < 8; n++) begin
      if (((int'(b) >> n) & 1) != 0) r ^= x;
      x <<= 1;
      if ((x & 256) != 0) x ^= poly;
    end
    return byte'(r);
  endfunction

  function automatic w32 rol(w32 x, int n);
    return (x << n) | (x >> (32 - n));
  endfunction

  function automatic w32 ror(w32 x, int n);
    return (x >> n) | (x << (32 - n));
  endfunction

  // Key-dependent S-box of byte position j with key words l[0..k-1]
  function automatic byte unsigned ref_sbox(int j, byte unsigned x, w32 l[], int k);
    // q0 = 0, q1 = 1 per column (column in front of L3, L2, L1, L0, final)
    int c3 [4] = '{1, 0, 0, 1};
    int c2 [4] = '{1, 1, 0, 0};
    int c1 [4] = '{0, 1, 0, 1};
    int c0 [4] = '{0, 0, 1, 1};
    int cf [4] = '{1, 0, 1, 0};
    byte unsigned y;
    y = x;
    if (k == 4) y = ref_q(c3[j], y) ^ byte'(l[3] >> (8 * j));
    if (k >= 3) y = ref_q(c2[j], y) ^ byte'(l[2] >> (8 * j));
    y = ref_q(c1[j], y) ^ byte'(l[1] >> (8 * j));
    y = ref_q(c0[j], y) ^ byte'(l[0] >> (8 * j));
    return ref_q(cf[j], y);
  endfunction

  localparam byte unsigned MDSM [4][4] = '{'{8'h01, 8'hEF, 8'h5B, 8'h5B},
                                           '{8'h5B, 8'hEF, 8'hEF, 8'h01},
                                           '{8'hEF, 8'h5B, 8'h01, 8'hEF},
                                           '{8'hEF, 8'h01, 8'hEF, 8'h5B}};

  function automatic w32 ref_mds(w32 y);
    w32 z;
    z = 0;
    for (int i = 0; i < 4; i++) begin
      byte unsigned acc;
      acc = 0;
      for (int j = 0; j < 4; j++) acc ^= gmul(MDSM[i][j], byte'(y >> (8 * j)), 'h169);
      z |= w32'(acc) << (8 * i);
    end
    return z;
  endfunction

  function automatic w32 ref_h(w32 x, w32 l[], int k);
    w32 y;
    y = 0;
    for (int j = 0; j < 4; j++) y |= w32'(ref_sbox(j, byte'(x >> (8 * j)), l, k)) << (8 * j);
    return ref_mds(y);
  endfunction

  localparam byte unsigned RSM [4][8] = '{
    '{8'h01, 8'hA4, 8'h55, 8'h87, 8'h5A, 8'h58, 8'hDB, 8'h9E},
    '{8'hA4, 8'h56, 8'h82, 8'hF3, 8'h1E, 8'hC6, 8'h68, 8'hE5},
    '{8'h02, 8'hA1, 8'hFC, 8'hC1, 8'h47, 8'hAE, 8'h3D, 8'h19},
    '{8'hA4, 8'h55, 8'h87, 8'h5A, 8'h58, 8'hDB, 8'h9E, 8'h03}};

  // Expanded key (key right-aligned in a 256-bit argument): 40 subkeys, S-box words in h order, key words
  typedef struct {
    int k;
    w32 K [40];
    w32 S [];
    w32 Me [];
    w32 Mo [];
  } ks_t;

  function automatic ks_t ref_keysched(logic [255:0] key, int bits);
    ks_t ks;
    byte unsigned kb [32];
    w32 M [8];
    ks.k = bits / 64;
    ks.S = new[ks.k];
    ks.Me = new[ks.k];
    ks.Mo = new[ks.k];
    for (int n = 0; n < bits / 8; n++) kb[n] = key[bits - 1 - 8 * n -: 8];
    for (int i = 0; i < 2 * ks.k; i++)
      M[i] = {kb[4*i+3], kb[4*i+2], kb[4*i+1], kb[4*i]};
    for (int i = 0; i < ks.k; i++) begin
      w32 s;
      ks.Me[i] = M[2*i];
      ks.Mo[i] = M[2*i+1];
      s = 0;
      for (int r = 0; r < 4; r++) begin
        byte unsigned acc;
        acc = 0;
        for (int c = 0; c < 8; c++) acc ^= gmul(RSM[r][c], kb[8*i+c], 'h14D);
        s |= w32'(acc) << (8 * r);
      end
      ks.S[ks.k - 1 - i] = s;
    end
    for (int i = 0; i < 20; i++) begin
      w32 a, b;
      a = ref_h(w32'(2 * i) * 32'h01010101, ks.Me, ks.k);
      b = rol(ref_h(w32'(2 * i + 1) * 32'h01010101, ks.Mo, ks.k), 8);
      ks.K[2*i]   = a + b;
      ks.K[2*i+1] = rol(a + 2 * b, 9);
    end
    return ks;
  endfunction

  function automatic logic [127:0] ref_cipher(ks_t ks, logic [127:0] blk, bit dec);
    w32 R [4], n2, n3, f0, f1, t0, t1;
    logic [127:0] o;
    for (int i = 0; i < 4; i++)
      R[i] = {blk[127-8*(4*i+3) -: 8], blk[127-8*(4*i+2) -: 8],
              blk[127-8*(4*i+1) -: 8], blk[127-8*(4*i) -: 8]} ^ ks.K[dec ? i + 4 : i];
    for (int r = 0; r < 16; r++) begin
      int rr;
      rr = dec ? 15 - r : r;
      t0 = ref_h(R[0], ks.S, ks.k);
      t1 = ref_h(rol(R[1], 8), ks.S, ks.k);
      f0 = t0 + t1 + ks.K[2*rr+8];
      f1 = t0 + 2 * t1 + ks.K[2*rr+9];
      if (dec) begin n2 = rol(R[2], 1) ^ f0; n3 = ror(R[3] ^ f1, 1); end
      else     begin n2 = ror(R[2] ^ f0, 1); n3 = rol(R[3], 1) ^ f1; end
      R[2] = R[0];
      R[3] = R[1];
      R[0] = n2;
      R[1] = n3;
    end
    for (int i = 0; i < 4; i++) begin
      w32 c;
      c = R[(i + 2) % 4] ^ ks.K[dec ? i : i + 4];
      for (int j = 0; j < 4; j++) o[127 - 8*(4*i+j) -: 8] = c[8*j +: 8];
    end
    return o;
  endfunction

endpackage
