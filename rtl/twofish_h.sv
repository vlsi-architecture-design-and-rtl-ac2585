// twofish_h: the h function, four key-dependent S-boxes followed by the MDS
// matrix, as a three-stage pipeline.
//
// Byte j of x enters S-box j together with byte j of every key word L_s. The
// S-box outputs are registered, then pass the two register stages of the MDS
// unit, so z = h(x, L) appears three enabled cycles after x. The same unit
// serves the round function (L = S, the key-dependent S-box words) and the
// subkey generation (L = even or odd key words).
module twofish_h
  import twofish_pkg::*;
#(
  parameter int unsigned KEY_BITS = 128
) (
  input  logic                          clk,
  input  logic                          en,
  input  logic [31:0]                   x,
  input  logic [KEY_BITS/64-1:0][31:0]  l,
  output logic [31:0]                   z
);

  localparam int unsigned KW = KEY_BITS / 64;

  logic [31:0] y_d, y_q;

  for (genvar j = 0; j < 4; j++) begin : g_sbox
    logic [KW-1:0][7:0] lb;
    for (genvar s = 0; s < KW; s++) begin : g_kb
      assign lb[s] = l[s][8*j +: 8];
    end
    twofish_sbox #(.KEY_BITS(KEY_BITS), .BYTE_POS(j)) u_sbox (
      .x(x[8*j +: 8]), .l(lb), .y(y_d[8*j +: 8])
    );
  end

  always_ff @(posedge clk) begin
    if (en) y_q <= y_d;
  end

  twofish_mds u_mds (.clk(clk), .en(en), .y(y_q), .z(z));

endmodule
