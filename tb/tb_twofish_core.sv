// tb_twofish_core: the folded datapath driven by a sequencer written in the
// testbench (not the RTL controller). It runs the key setup passes, then an
// encryption batch of three blocks, and compares every output block with the reference cipher.
// Eight more batches follow with random keys, modes and sizes; every second
// one starts right after the previous batch, so outputs leave while the next
// blocks enter.
// Each block must leave exactly 64 cycles after it was loaded. The first
// encryption uses the all-zero key and block of the Twofish test vectors.
module tb_twofish_core;
  import twofish_pkg::*;
  import twofish_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [1:0][31:0] s_words, me, mo;
  logic decrypt, setup, key_issue, load_slot, last_round, out_push, busy;
  logic [4:0] key_idx;
  logic [127:0] in_data, out_data;
  int checks = 0, failures = 0, cyc = 0;
  logic [127:0] expq [$];
  int dueq [$];

  twofish_core #(.KEY_BITS(128)) u_dut (
    .clk(clk), .rst_n(rst_n), .s_words(s_words), .me(me), .mo(mo),
    .decrypt(decrypt), .setup(setup), .key_issue(key_issue), .key_idx(key_idx),
    .load_slot(load_slot), .last_round(last_round), .in_data(in_data),
    .out_data(out_data), .out_push(out_push), .busy(busy));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && out_push) begin
      checks++;
      if (expq.size() == 0) failures++;
      else begin
        logic [127:0] e;
        int d;
        e = expq.pop_front();
        d = dueq.pop_front();
        if (out_data != e || cyc != d) begin
          failures++;
          $display("out %032h exp %032h at %0d due %0d", out_data, e, cyc, d);
        end
      end
    end
  end

  task automatic set_key(logic [127:0] k, bit dec, output ks_t ks);
    ks = ref_keysched({128'h0, k}, 128);
    @(negedge clk);
    for (int i = 0; i < 2; i++) begin
      s_words[i] = ks.S[i]; me[i] = ks.Me[i]; mo[i] = ks.Mo[i];
    end
    decrypt = dec;
    setup = 1;
    for (int c = 0; c < 8; c++) begin
      key_issue = (c < 4);
      key_idx = 5'(c);
      @(negedge clk);
    end
    key_issue = 0;
    setup = 0;
  endtask

  task automatic run_batch(ks_t ks, logic [127:0] blk [], bit dec);
    for (int c = 0; c < 64; c++) begin
      int phase, period;
      phase = c % 4;
      period = c / 4;
      key_issue = (phase == 0);
      key_idx = dec ? 5'(19 - period) : 5'(4 + period);
      last_round = (period == 15);
      load_slot = (period == 0) && phase != 0 && phase <= blk.size();
      if (load_slot) begin
        in_data = blk[phase - 1];
        expq.push_back(ref_cipher(ks, blk[phase - 1], dec));
        dueq.push_back(cyc + 64);
      end
      @(negedge clk);
    end
    key_issue = 0;
    load_slot = 0;
    last_round = 0;
  endtask

  initial begin
    ks_t ks;
    logic [127:0] blk [];
    logic [127:0] k;
    decrypt = 0; setup = 0; key_issue = 0; key_idx = 0; load_slot = 0; last_round = 0;
    in_data = '0; s_words = '0; me = '0; mo = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    set_key('0, 0, ks);
    checks++;
    if (ref_cipher(ks, '0, 0) != 128'h9F589F5CF6122C32B6BFEC2F2AE8C35A) failures++;
    blk = new[3];
    blk[0] = '0;
    blk[1] = {$urandom, $urandom, $urandom, $urandom};
    blk[2] = {$urandom, $urandom, $urandom, $urandom};
    run_batch(ks, blk, 0);
    repeat (6) @(negedge clk);
    // further batches: random keys, modes and batch sizes, some back to back
    for (int b = 0; b < 8; b++) begin
      bit dec;
      dec = (b % 3) != 0;
      if (b % 2 == 0) begin
        repeat (6) @(negedge clk);
        k = {$urandom, $urandom, $urandom, $urandom};
        set_key(k, dec, ks);
      end
      blk = new[1 + $urandom % 3];
      foreach (blk[i]) blk[i] = {$urandom, $urandom, $urandom, $urandom};
      run_batch(ks, blk, b % 2 == 0 ? dec : decrypt);
    end
    repeat (8) @(negedge clk);
    checks++;
    if (expq.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
