// twofish_mds: multiply four S-box bytes by the 4x4 MDS matrix over GF(2^8).
//
//   z0 = 01*y0 ^ EF*y1 ^ 5B*y2 ^ 5B*y3
//   z1 = 5B*y0 ^ EF*y1 ^ EF*y2 ^ 01*y3
//   z2 = EF*y0 ^ 5B*y1 ^ 01*y2 ^ EF*y3
//   z3 = EF*y0 ^ 01*y1 ^ EF*y2 ^ 5B*y3
//
// Only the constants 01, 5B and EF occur, so each input byte feeds one "mul
// 5B" and one "mul EF" network (shift-and-reduce with the field polynomial
// x^8+x^6+x^5+x^3+1 of the Twofish specification). The first register stage
// holds eight partial sums, one per output row for the pair (y0,y1) and one
// for the pair (y2,y3); the second stage XORs each pair into z0..z3. Latency
// two cycles while en is high; registers hold when en is low and have no reset
// (their contents are qualified by valid tags kept outside).
module twofish_mds
  import twofish_pkg::*;
(
  input  logic        clk,
  input  logic        en,
  input  logic [31:0] y,     // y0 in bits 7:0
  output logic [31:0] z      // z0 in bits 7:0
);

  // Multiply by x^-1 and x^-2 in the field (0x169 >> 1 = 0xB4).
  function automatic logic [7:0] div_x(logic [7:0] a);
    return (a >> 1) ^ (a[0] ? 8'hB4 : 8'h00);
  endfunction

  function automatic logic [7:0] mul_5b(logic [7:0] a);
    return a ^ div_x(div_x(a));
  endfunction

  function automatic logic [7:0] mul_ef(logic [7:0] a);
    return a ^ div_x(a) ^ div_x(div_x(a));
  endfunction

  logic [7:0] b [4];
  logic [7:0] m5 [4];
  logic [7:0] me [4];
  logic [3:0][7:0] lo_d, hi_d;   // next partial sums
  logic [3:0][7:0] lo_q, hi_q;   // first register stage

  always_comb begin
    for (int j = 0; j < 4; j++) begin
      b[j]  = y[8*j +: 8];
      m5[j] = mul_5b(b[j]);
      me[j] = mul_ef(b[j]);
    end
    lo_d[0] = b[0]  ^ me[1];   hi_d[0] = m5[2] ^ m5[3];
    lo_d[1] = m5[0] ^ me[1];   hi_d[1] = me[2] ^ b[3];
    lo_d[2] = me[0] ^ m5[1];   hi_d[2] = b[2]  ^ me[3];
    lo_d[3] = me[0] ^ b[1];    hi_d[3] = me[2] ^ m5[3];
  end

  always_ff @(posedge clk) begin
    if (en) begin
      lo_q <= lo_d;
      hi_q <= hi_d;
      z    <= lo_q ^ hi_q;
    end
  end

endmodule
