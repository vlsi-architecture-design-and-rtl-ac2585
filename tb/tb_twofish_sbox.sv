// tb_twofish_sbox: random check of the key-dependent S-box chain for all four
// byte positions with a 128-bit key, and for one position each with 192- and
// 256-bit keys, against the reference model.
module tb_twofish_sbox;
  import twofish_ref_pkg::*;

  logic [7:0] x;
  logic [3:0][7:0] y128;
  logic [7:0] y192, y256;
  logic [3:0][31:0] lw;
  logic [3:0][1:0][7:0] l128;
  logic [2:0][7:0] l192;
  logic [3:0][7:0] l256;
  int checks = 0, failures = 0;

  for (genvar j = 0; j < 4; j++) begin : g_pos
    assign l128[j] = {lw[1][8*j +: 8], lw[0][8*j +: 8]};
    twofish_sbox #(.KEY_BITS(128), .BYTE_POS(j)) u_s (.x(x), .l(l128[j]), .y(y128[j]));
  end
  assign l192 = {lw[2][23:16], lw[1][23:16], lw[0][23:16]};
  assign l256 = {lw[3][15:8], lw[2][15:8], lw[1][15:8], lw[0][15:8]};
  twofish_sbox #(.KEY_BITS(192), .BYTE_POS(2)) u_s192 (.x(x), .l(l192), .y(y192));
  twofish_sbox #(.KEY_BITS(256), .BYTE_POS(1)) u_s256 (.x(x), .l(l256), .y(y256));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    w32 l [];
    l = new[4];
    for (int t = 0; t < 500; t++) begin
      x  = 8'($urandom);
      for (int i = 0; i < 4; i++) begin
        lw[i] = (t < 4) ? '0 : $urandom;
        l[i]  = lw[i];
      end
      #1;
      for (int j = 0; j < 4; j++) begin
        checks++;
        if (y128[j] != ref_sbox(j, x, l, 2)) begin
          failures++;
          $display("pos %0d x=%02h got %02h exp %02h", j, x, y128[j], ref_sbox(j, x, l, 2));
        end
      end
      checks += 2;
      if (y192 != ref_sbox(2, x, l, 3)) failures++;
      if (y256 != ref_sbox(1, x, l, 4)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
