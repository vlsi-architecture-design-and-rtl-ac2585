// tb_twofish_top: end-to-end test of the Twofish core at its default
// configuration (128-bit key), also used as the full-size test.
//
//  1. Known answers from the Twofish test vectors: the all-zero key and
//     block, and the 49-step chain where each ciphertext becomes the next
//     plaintext and the previous plaintext the next key (one key change per
//     block, which exercises key setup 49 times).
//  2. A stream of random blocks with random input gaps and random output
//     back-pressure, encrypting, then after a key change decrypting the same
//     ciphertexts back. Every result is compared with the reference cipher.
//  3. Timing: the latency of a lone block and the steady-state rate of three
//     blocks per 64 cycles.
// Each mechanism of the design must occur at least once: key setup, a full
// batch, a partial batch, back-to-back batches, a batch cut short by the
// output buffer, input back-pressure, output back-pressure, a mode switch
// to decryption and on-the-fly subkey passes.
module tb_twofish_top;
  import twofish_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic key_valid, key_ready, decrypt, in_valid, in_ready, out_valid, out_ready, busy;
  logic [127:0] key, in_data, out_data;
  int checks = 0, failures = 0, cyc = 0;
  logic [127:0] expq [$];

  twofish_top u_dut (
    .clk(clk), .rst_n(rst_n), .key_valid(key_valid), .key_ready(key_ready), .key(key),
    .decrypt(decrypt), .in_valid(in_valid), .in_ready(in_ready), .in_data(in_data),
    .out_valid(out_valid), .out_ready(out_ready), .out_data(out_data), .busy(busy));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- mechanism counters, observed inside the design (controller states:
  //      2 = ready, 3 = running a batch) ----
  int n_setup = 0, n_full = 0, n_partial = 0, n_b2b = 0, n_cut = 0;
  int n_in_bp = 0, n_out_bp = 0, n_dec = 0, n_subkey = 0;
  int last_start = -1000;
  always @(posedge clk) begin
    if (rst_n) begin
      if (u_dut.u_ctrl.key_load) n_setup++;
      if (u_dut.u_ctrl.setup == 0 && u_dut.key_issue) n_subkey++;
      if (u_dut.u_ctrl.state == 2'd3 && u_dut.u_ctrl.cnt == 6'd1) begin
        if (u_dut.u_ctrl.nblk == 2'd3) n_full++; else n_partial++;
        if (cyc - last_start == 64) n_b2b++;
        if (u_dut.u_ctrl.decrypt) n_dec++;
        last_start = cyc;
      end
      if ((u_dut.u_ctrl.state == 2'd2 ||
           (u_dut.u_ctrl.state == 2'd3 && u_dut.u_ctrl.cnt == 6'd63)) &&
          u_dut.u_ctrl.n_next < u_dut.in_count && u_dut.u_ctrl.n_next < 2'd3) n_cut++;
      if (in_valid && !in_ready) n_in_bp++;
      if (out_valid && !out_ready) n_out_bp++;
    end
  end

  // ---- output checker ----
  int n_out = 0;
  int out_cycles [$];
  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      checks++;
      n_out++;
      out_cycles.push_back(cyc);
      if (expq.size() == 0) begin failures++; $display("unexpected output"); end
      else begin
        logic [127:0] e;
        e = expq.pop_front();
        if (out_data !== e) begin
          failures++;
          $display("out %032h exp %032h", out_data, e);
        end
      end
    end
  end

  task automatic load_key(logic [127:0] k, bit dec);
    @(negedge clk);
    key = k; decrypt = dec; key_valid = 1;
    while (!key_ready) @(negedge clk);
    @(negedge clk);
    key_valid = 0;
  endtask

  task automatic send(logic [127:0] blk, ks_t ks, bit dec);
    in_data = blk; in_valid = 1;
    expq.push_back(ref_cipher(ks, blk, dec));
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    @(negedge clk);
    in_valid = 0;
  endtask

  task automatic drain();
    while (expq.size() != 0 || busy) @(negedge clk);
  endtask

  logic [127:0] ct [64];
  logic [127:0] pt [64];

  initial begin
    ks_t ks;
    logic [127:0] k, p, c, prevk;
    int t_acc, lat, pass_all;
    key_valid = 0; decrypt = 0; in_valid = 0; out_ready = 1; key = '0; in_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // 1. known answers: 49-step chain from the all-zero key and block
    k = '0; p = '0;
    for (int i = 1; i <= 49; i++) begin
      ks = ref_keysched({128'h0, k}, 128);
      load_key(k, 0);
      send(p, ks, 0);
      wait (out_valid);
      c = out_data;
      drain();
      if (i == 1) begin
        checks++;
        if (c != 128'h9F589F5CF6122C32B6BFEC2F2AE8C35A) begin failures++; $display("KAT I=1 %032h", c); end
      end
      prevk = k; k = p; p = c;
    end
    checks++;
    if (c != 128'h5D9D4EEFFA9151575524F115815A12E0) begin failures++; $display("KAT I=49 %032h", c); end

    // 3a. latency of a lone block
    k = {$urandom, $urandom, $urandom, $urandom};
    ks = ref_keysched({128'h0, k}, 128);
    load_key(k, 0);
    while (!key_ready) @(negedge clk);
    in_data = {$urandom, $urandom, $urandom, $urandom};
    expq.push_back(ref_cipher(ks, in_data, 0));
    in_valid = 1;
    @(posedge clk);
    t_acc = cyc;
    @(negedge clk);
    in_valid = 0;
    while (!out_valid) @(posedge clk);
    lat = cyc - t_acc;
    checks++;
    // counted from the accepting edge to the first edge that sees out_valid
    if (lat != 68) begin failures++; $display("lone-block latency %0d", lat); end
    drain();

    // 3b. steady-state rate: 30 blocks supplied as fast as accepted
    out_cycles.delete();
    fork
      for (int i = 0; i < 30; i++) send({$urandom, $urandom, $urandom, $urandom}, ks, 0);
    join
    drain();
    checks++;
    if (out_cycles.size() != 30 || out_cycles[27] - out_cycles[3] != 8 * 64) begin
      failures++;
      $display("rate: 24 blocks took %0d cycles, expected %0d", out_cycles[27] - out_cycles[3], 8 * 64);
    end

    // 2. random stream with back-pressure, encrypt then decrypt back
    k = {$urandom, $urandom, $urandom, $urandom};
    ks = ref_keysched({128'h0, k}, 128);
    load_key(k, 0);
    fork
      begin
        for (int i = 0; i < 64; i++) begin
          pt[i] = {$urandom, $urandom, $urandom, $urandom};
          send(pt[i], ks, 0);
          repeat ($urandom % 3 == 0 ? $urandom % 30 : 0) @(negedge clk);
        end
      end
      begin
        while (expq.size() != 0 || busy || in_valid || n_out < 49 + 1 + 30 + 64) begin
          @(negedge clk);
          out_ready = ($urandom % 8) != 0 && !((cyc / 300) % 3 == 1);
        end
        out_ready = 1;
      end
    join
    // collect the ciphertexts from the reference and decrypt them back
    for (int i = 0; i < 64; i++) ct[i] = ref_cipher(ks, pt[i], 0);
    load_key(k, 1);
    pass_all = 1;
    for (int i = 0; i < 64; i++) begin
      send(ct[i], ks, 1);
      checks++;
      if (ref_cipher(ks, ct[i], 1) != pt[i]) pass_all = 0;
    end
    drain();
    if (!pass_all) failures++;

    // mechanism coverage
    begin
      int cnt [9];
      string nm [9];
      cnt = '{n_setup, n_full, n_partial, n_b2b, n_cut, n_in_bp, n_out_bp, n_dec, n_subkey};
      nm  = '{"key setup", "full batch", "partial batch", "back-to-back batches", "batch cut by output room",
              "input back-pressure", "output back-pressure", "decrypt batches", "subkey passes"};
      for (int i = 0; i < 9; i++) begin
        $display("%-26s %0d", nm[i], cnt[i]);
        checks++;
        if (cnt[i] == 0) begin failures++; $display("mechanism never happened: %s", nm[i]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
