// twofish_keydep: session-key register and key-dependent words.
//
// On load the session key is captured together with the words the rest of
// the core derives from it:
//   me[j] = M(2j), mo[j] = M(2j+1)     (the key as little-endian 32-bit words)
//   s_words[j] = S(k-1-j)              (S-box key words, in the order h uses)
// where k = KEY_BITS/64 and S(i) is the Reed-Solomon code of key bytes
// 8i..8i+7: four bytes, each a GF(2^8) dot product of a row of the RS matrix
// with the eight key bytes, field polynomial x^8+x^6+x^3+x^2+1. The RS code
// and its matrix are those of the Twofish specification. Port key has byte 0
// in its most significant bits. Outputs are registered and valid from the
// cycle after load; reset clears them.
module twofish_keydep
  import twofish_pkg::*;
#(
  parameter int unsigned KEY_BITS = 128
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          load,
  input  logic [KEY_BITS-1:0]           key,
  output logic [KEY_BITS/64-1:0][31:0]  s_words,
  output logic [KEY_BITS/64-1:0][31:0]  me,
  output logic [KEY_BITS/64-1:0][31:0]  mo
);

  localparam int unsigned KW = KEY_BITS / 64;

  localparam logic [7:0] RS [4][8] = '{
    '{8'h01, 8'hA4, 8'h55, 8'h87, 8'h5A, 8'h58, 8'hDB, 8'h9E},
    '{8'hA4, 8'h56, 8'h82, 8'hF3, 8'h1E, 8'hC6, 8'h68, 8'hE5},
    '{8'h02, 8'hA1, 8'hFC, 8'hC1, 8'h47, 8'hAE, 8'h3D, 8'h19},
    '{8'hA4, 8'h55, 8'h87, 8'h5A, 8'h58, 8'hDB, 8'h9E, 8'h03}};

  function automatic logic [7:0] gf_mul_rs(logic [7:0] a, logic [7:0] b);
    logic [7:0] r, v;
    r = '0;
    v = a;
    for (int n = 0; n < 8; n++) begin
      if (b[n]) r ^= v;
      v = {v[6:0], 1'b0} ^ (v[7] ? 8'h4D : 8'h00);
    end
    return r;
  endfunction

  logic [7:0]                kb [KEY_BITS/8];
  logic [KW-1:0][31:0]       s_d, me_d, mo_d;

  always_comb begin
    for (int n = 0; n < KEY_BITS/8; n++) kb[n] = key[KEY_BITS-1-8*n -: 8];
    for (int j = 0; j < KW; j++) begin
      for (int b = 0; b < 4; b++) begin
        me_d[j][8*b +: 8] = kb[8*j + b];
        mo_d[j][8*b +: 8] = kb[8*j + 4 + b];
      end
    end
    for (int i = 0; i < KW; i++) begin
      for (int r = 0; r < 4; r++) begin
        logic [7:0] acc;
        acc = '0;
        for (int c = 0; c < 8; c++) acc ^= gf_mul_rs(RS[r][c], kb[8*i + c]);
        s_d[KW-1-i][8*r +: 8] = acc;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_words <= '0;
      me      <= '0;
      mo      <= '0;
    end else if (load) begin
      s_words <= s_d;
      me      <= me_d;
      mo      <= mo_d;
    end
  end

endmodule
