// twofish_pht: Pseudo-Hadamard transform with the key-schedule rotation.
//
//   in2' = key_mode ? (in2 rotated left by 8) : in2
//   out1 = in1 + in2'          out2 = in1 + 2*in2' = out1 + in2'
//
// Built from two 32-bit carry-lookahead adders, the second chained after the
// first. The hard-wired 8-bit rotation on input 2 is selected only for subkey
// generation, where the second h result must be rotated before the PHT
// (B = ROL(h(...), 8) in the Twofish key schedule). The drawing of the design
// labels this rotation as a right rotation; a left rotation is what the
// cipher requires and is used here. Combinational.
module twofish_pht
  import twofish_pkg::*;
(
  input  logic [31:0] in1,
  input  logic [31:0] in2,
  input  logic        key_mode,
  output logic [31:0] out1,
  output logic [31:0] out2
);

  logic [31:0] in2_sel;

  assign in2_sel = key_mode ? rol32(in2, 8) : in2;

  twofish_cla32 #(.WIDTH(32)) u_add1 (.a(in1),  .b(in2_sel), .s(out1));
  twofish_cla32 #(.WIDTH(32)) u_add2 (.a(out1), .b(in2_sel), .s(out2));

endmodule
