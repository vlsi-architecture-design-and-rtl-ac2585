// twofish_pkg: constants, types and small functions shared by the Twofish core.
//
// Word and byte conventions follow the Twofish specification: a 128-bit block
// or a key is a byte string whose byte 0 sits in the most significant bits of
// the port, and each 32-bit word is formed little-endian from four bytes
// (byte 4i in bits 7:0 of word i). The 4x4-bit tables of the q permutations and
// the MDS field polynomial come from the Twofish specification; the matrix and
// the data flow they serve are the ones of the design described below.
package twofish_pkg;

  typedef logic [31:0]       word_t;
  typedef logic [3:0][31:0]  words4_t;   // words4_t[i] is word i
  typedef logic [127:0]      block_t;

  // One slot of the folded round loop: the four state words of a block and
  // whether it is present and in its last round.
  typedef struct packed {
    logic    valid;
    logic    last;
    words4_t w;
  } slot_t;

  // Rounds of the cipher and depth of the folded F-function pipeline.
  localparam int unsigned ROUNDS     = 16;
  localparam int unsigned PIPE_DEPTH = 4;
  localparam int unsigned DATA_SLOTS = PIPE_DEPTH - 1;   // slot 0 carries the subkey pass

  // Nibble tables t0..t3 of q0 and q1; entry n is bits [4n+3:4n].
  localparam logic [63:0] Q0_T [4] = '{64'h4ACE_95B0_23F6_D718, 64'hD907_6A4F_5321_8BCE,
                                       64'h1742_3F8C_09D6_E5AB, 64'hAC58_03B9_E621_4F7D};
  localparam logic [63:0] Q1_T [4] = '{64'h5CA0_4913_E67F_DB82, 64'h809F_5AD6_73C4_B2E1,
                                       64'hF3B2_8DE0_A961_57C4, 64'hA802_F746_ED3C_159B};

  function automatic word_t rol32(word_t x, int unsigned n);
    return (x << n) | (x >> (32 - n));
  endfunction

  function automatic word_t ror32(word_t x, int unsigned n);
    return (x >> n) | (x << (32 - n));
  endfunction

  // Block <-> words, byte 0 of the block in bits 127:120.
  function automatic words4_t block_to_words(block_t b);
    words4_t w;
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++)
        w[i][8*j +: 8] = b[127 - 8*(4*i + j) -: 8];
    return w;
  endfunction

  function automatic block_t words_to_block(words4_t w);
    block_t b;
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++)
        b[127 - 8*(4*i + j) -: 8] = w[i][8*j +: 8];
    return b;
  endfunction

endpackage
