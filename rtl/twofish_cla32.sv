// twofish_cla32: carry-lookahead adder, sum modulo 2^WIDTH.
//
// Bits are grouped by four. Each group forms its generate and propagate
// terms; a second lookahead level computes every group carry-in directly from
// the group terms and the carry into bit 0 (which is zero), and each group
// then resolves its internal carries by lookahead as well. The grouping is
// this design's choice; the design only calls for fast carry-lookahead adders
// in the PHT and subkey additions. Combinational.
module twofish_cla32 #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] s
);

  localparam int unsigned NG = WIDTH / 4;

  logic [WIDTH-1:0] g, p, c;
  logic [NG-1:0]    gg, gp;
  logic [NG:0]      gc;

  always_comb begin
    g = a & b;
    p = a ^ b;
    // group generate / propagate
    for (int k = 0; k < NG; k++) begin
      gp[k] = &p[4*k +: 4];
      gg[k] = g[4*k+3]
            | (p[4*k+3] & g[4*k+2])
            | (p[4*k+3] & p[4*k+2] & g[4*k+1])
            | (p[4*k+3] & p[4*k+2] & p[4*k+1] & g[4*k]);
    end
    // second level: carry into each group, expanded as a sum of products
    for (int k = 0; k <= NG; k++) begin
      gc[k] = 1'b0;
      for (int m = 0; m < k; m++) begin
        logic term;
        term = gg[m];
        for (int n = m + 1; n < k; n++) term = term & gp[n];
        gc[k] = gc[k] | term;
      end
    end
    // carries inside each group
    for (int k = 0; k < NG; k++) begin
      c[4*k]   = gc[k];
      c[4*k+1] = g[4*k]   | (p[4*k]   & gc[k]);
      c[4*k+2] = g[4*k+1] | (p[4*k+1] & g[4*k])   | (p[4*k+1] & p[4*k]   & gc[k]);
      c[4*k+3] = g[4*k+2] | (p[4*k+2] & g[4*k+1]) | (p[4*k+2] & p[4*k+1] & g[4*k])
               | (p[4*k+2] & p[4*k+1] & p[4*k] & gc[k]);
    end
    s = p ^ c;
  end

endmodule
