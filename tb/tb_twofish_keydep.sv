// tb_twofish_keydep: key words and Reed-Solomon S-box words for random
// 128-bit keys (the default) and 256-bit keys, against the reference key
// schedule; the registers must hold while load is low.
module tb_twofish_keydep;
  import twofish_ref_pkg::*;

  logic clk = 0, rst_n = 0, load;
  logic [127:0] key128;
  logic [255:0] key256;
  logic [1:0][31:0] s2, me2, mo2;
  logic [3:0][31:0] s4, me4, mo4;
  int checks = 0, failures = 0;

  twofish_keydep #(.KEY_BITS(128)) u_k128 (.clk(clk), .rst_n(rst_n), .load(load), .key(key128),
                                          .s_words(s2), .me(me2), .mo(mo2));
  twofish_keydep #(.KEY_BITS(256)) u_k256 (.clk(clk), .rst_n(rst_n), .load(load), .key(key256),
                                          .s_words(s4), .me(me4), .mo(mo4));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ks_t a, b;
    load = 0; key128 = '0; key256 = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 100; t++) begin
      key128 = {$urandom, $urandom, $urandom, $urandom};
      key256 = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      if (t == 0) key256 = 256'h0123456789ABCDEFFEDCBA987654321000112233445566778899AABBCCDDEEFF;
      a = ref_keysched({128'h0, key128}, 128);
      b = ref_keysched(key256, 256);
      load = 1;
      @(negedge clk);
      load = 0;
      key128 = ~key128;
      key256 = ~key256;
      @(negedge clk);
      for (int i = 0; i < 2; i++) begin
        checks += 3;
        if (s2[i] != a.S[i])   begin failures++; $display("S[%0d] %08h exp %08h", i, s2[i], a.S[i]); end
        if (me2[i] != a.Me[i]) failures++;
        if (mo2[i] != a.Mo[i]) failures++;
      end
      for (int i = 0; i < 4; i++) begin
        checks += 3;
        if (s4[i] != b.S[i])   begin failures++; $display("S256[%0d] %08h exp %08h", i, s4[i], b.S[i]); end
        if (me4[i] != b.Me[i]) failures++;
        if (mo4[i] != b.Mo[i]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
