// twofish_qbox: the fixed byte permutation q0 (Q_SEL=0) or q1 (Q_SEL=1).
//
// The byte is split into a high nibble A and a low nibble B. Two identical
// half-rounds follow: A' = A xor B, B' = A xor (B rotated right by one bit
// within the nibble) xor (A shifted left by three), then A' and B' pass
// through two 4x4-bit tables. The first half-round uses tables t0/t1, the
// second t2/t3, and the result byte is 16*B'' + A''. The structure is that of
// the q-box drawing of the design; the table contents are those of the Twofish
// specification. Purely combinational, as the S-boxes are built from logic
// rather than RAM.
module twofish_qbox
  import twofish_pkg::*;
#(
  parameter bit Q_SEL = 1'b0
) (
  input  logic [7:0] x,
  output logic [7:0] y
);

  localparam logic [63:0] T [4] = (Q_SEL == 0) ? Q0_T : Q1_T;

  function automatic logic [3:0] lookup(logic [63:0] tab, logic [3:0] idx);
    return tab[4*idx +: 4];
  endfunction

  function automatic logic [3:0] ror4(logic [3:0] v);
    return {v[0], v[3:1]};
  endfunction

  logic [3:0] a0, b0, a1, b1, a2, b2, a3, b3, a4, b4;

  always_comb begin
    a0 = x[7:4];
    b0 = x[3:0];
    a1 = a0 ^ b0;
    b1 = a0 ^ ror4(b0) ^ {a0[0], 3'b000};
    a2 = lookup(T[0], a1);
    b2 = lookup(T[1], b1);
    a3 = a2 ^ b2;
    b3 = a2 ^ ror4(b2) ^ {a2[0], 3'b000};
    a4 = lookup(T[2], a3);
    b4 = lookup(T[3], b3);
    y  = {b4, a4};
  end

endmodule
