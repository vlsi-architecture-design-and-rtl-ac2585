// tb_twofish_top_keylen: the two longer key configurations of the core,
// KEY_BITS = 192 and 256, side by side. Each is checked against the Twofish
// known-answer vectors for the key 0123456789ABCDEFFEDCBA9876543210...
// with an all-zero block, then against the reference cipher for a batch of
// random blocks, encrypted and then decrypted under a random key.
module tb_twofish_top_keylen;
  import twofish_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one instance per key length; index 0 = 192 bits, 1 = 256 bits
  logic         key_valid [2], key_ready [2], decrypt [2], in_valid [2], in_ready [2];
  logic         out_valid [2], out_ready [2], busy [2];
  logic [255:0] key [2];
  logic [127:0] in_data [2], out_data [2];

  twofish_top #(.KEY_BITS(192)) u_192 (
    .clk(clk), .rst_n(rst_n), .key_valid(key_valid[0]), .key_ready(key_ready[0]), .key(key[0][191:0]),
    .decrypt(decrypt[0]), .in_valid(in_valid[0]), .in_ready(in_ready[0]), .in_data(in_data[0]),
    .out_valid(out_valid[0]), .out_ready(out_ready[0]), .out_data(out_data[0]), .busy(busy[0]));
  twofish_top #(.KEY_BITS(256)) u_256 (
    .clk(clk), .rst_n(rst_n), .key_valid(key_valid[1]), .key_ready(key_ready[1]), .key(key[1]),
    .decrypt(decrypt[1]), .in_valid(in_valid[1]), .in_ready(in_ready[1]), .in_data(in_data[1]),
    .out_valid(out_valid[1]), .out_ready(out_ready[1]), .out_data(out_data[1]), .busy(busy[1]));

  task automatic run(int u, int bits, logic [255:0] k, bit dec, logic [127:0] blk [], output logic [127:0] res []);
    int got;
    res = new[blk.size()];
    @(negedge clk);
    key[u] = k; decrypt[u] = dec; key_valid[u] = 1;
    while (!key_ready[u]) @(negedge clk);
    @(negedge clk);
    key_valid[u] = 0;
    got = 0;
    fork
      for (int i = 0; i < blk.size(); i++) begin
        in_data[u] = blk[i]; in_valid[u] = 1;
        @(posedge clk);
        while (!in_ready[u]) @(posedge clk);
        @(negedge clk);
        in_valid[u] = 0;
      end
      while (got < blk.size()) begin
        @(posedge clk);
        if (out_valid[u] && out_ready[u]) begin res[got] = out_data[u]; got++; end
      end
    join
  endtask

  task automatic test(int u, int bits, logic [127:0] kat);
    logic [255:0] k;
    logic [127:0] blk [], res [], back [];
    ks_t ks;
    // known answer (key right-aligned for the reference, left part for the port)
    k = 256'h0123456789ABCDEFFEDCBA987654321000112233445566778899AABBCCDDEEFF;
    if (bits == 192) k = {64'h0, k[255:64]};
    blk = new[1];
    blk[0] = '0;
    run(u, bits, k, 0, blk, res);
    checks++;
    if (res[0] != kat) begin failures++; $display("%0d-bit KAT %032h exp %032h", bits, res[0], kat); end
    // random batch, encrypt and decrypt back
    k = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
    if (bits == 192) k[255:192] = '0;
    ks = ref_keysched(k, bits);
    blk = new[7];
    foreach (blk[i]) blk[i] = {$urandom, $urandom, $urandom, $urandom};
    run(u, bits, k, 0, blk, res);
    foreach (blk[i]) begin
      checks++;
      if (res[i] != ref_cipher(ks, blk[i], 0)) failures++;
    end
    run(u, bits, k, 1, res, back);
    foreach (blk[i]) begin
      checks++;
      if (back[i] != blk[i]) failures++;
    end
  endtask

  initial begin
    for (int u = 0; u < 2; u++) begin
      key_valid[u] = 0; decrypt[u] = 0; in_valid[u] = 0; out_ready[u] = 1;
      key[u] = '0; in_data[u] = '0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    fork
      test(0, 192, 128'hCFD1D2E5A9BE9CDF501F13B892BD2248);
      test(1, 256, 128'h37527BE0052334B89F0CFCCAE87CFA20);
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
