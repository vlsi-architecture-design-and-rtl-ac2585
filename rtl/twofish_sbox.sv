// twofish_sbox: one key-dependent byte S-box (Sbox0..Sbox3) of the h function.
//
// The S-box is a chain of fixed q permutations with a key byte XORed in
// between. For a 128-bit key (the configuration drawn for this design) the
// chain is q - xor L1 - q - xor L0 - q; each longer key adds one q column and
// one key XOR in front (L2, then L3). Which of q0/q1 sits in each column
// depends on the byte position BYTE_POS, following the Twofish specification;
// the first column of the 128-bit chain reads q0, q1, q0, q1 for bytes 0..3.
// Combinational; port l[s] is the byte of key word L_s used by this position.
module twofish_sbox
  import twofish_pkg::*;
#(
  parameter int unsigned KEY_BITS = 128,
  parameter int unsigned BYTE_POS = 0
) (
  input  logic [7:0]                    x,
  input  logic [KEY_BITS/64-1:0][7:0]   l,
  output logic [7:0]                    y
);

  localparam int unsigned KW = KEY_BITS / 64;

  // q selection per column: COL_SEL[s][j] for the column that precedes the
  // XOR with L_s; FINAL_SEL[j] for the last column.
  localparam logic [3:0] COL_SEL [4] = '{4'b1100,   // s=0: q0 q0 q1 q1 (bit j = byte j)
                                         4'b1010,   // s=1: q0 q1 q0 q1
                                         4'b0011,   // s=2: q1 q1 q0 q0
                                         4'b1001};  // s=3: q1 q0 q0 q1
  localparam logic [3:0] FINAL_SEL = 4'b0101;       // q1 q0 q1 q0

  logic [7:0] v [KW+1];
  logic [7:0] qo [KW];

  assign v[KW] = x;

  for (genvar s = 0; s < KW; s++) begin : g_col
    twofish_qbox #(.Q_SEL(COL_SEL[s][BYTE_POS])) u_q (.x(v[s+1]), .y(qo[s]));
    assign v[s] = qo[s] ^ l[s];
  end

  twofish_qbox #(.Q_SEL(FINAL_SEL[BYTE_POS])) u_qf (.x(v[0]), .y(y));

endmodule
