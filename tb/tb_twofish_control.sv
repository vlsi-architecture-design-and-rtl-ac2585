// tb_twofish_control: the controller's schedule, observed cycle by cycle.
// The testbench plays the buffers and the core: it keeps the input and output
// counts and returns every loaded block on out_push 64 cycles after its load.
// Checked: the four setup subkey passes (indices 0..3, eight setup cycles);
// per batch a subkey pass every 4 cycles with index r+4 (encrypt) or 19-r
// (decrypt); loads only in cycles 1..n of a batch; last_round exactly in
// cycles 60..63; back-to-back batches 64 cycles apart; a batch cut down to
// the room left in the output buffer; no new key while blocks are in flight.
module tb_twofish_control;
  logic clk = 0, rst_n = 0;
  logic key_valid, key_ready, decrypt_in, out_push;
  logic [1:0] in_count;
  logic [2:0] out_count;
  logic key_load, decrypt, setup, key_issue, load_slot, last_round, busy;
  logic [4:0] key_idx;
  int checks = 0, failures = 0;
  int cyc = 0;
  int in_avail = 0, out_cnt = 0;
  int push_at [$];

  twofish_control #(.IN_DEPTH(3), .OUT_DEPTH(6)) u_dut (
    .clk(clk), .rst_n(rst_n), .key_valid(key_valid), .key_ready(key_ready),
    .decrypt_in(decrypt_in), .in_count(in_count), .out_count(out_count), .out_push(out_push),
    .key_load(key_load), .decrypt(decrypt), .setup(setup), .key_issue(key_issue),
    .key_idx(key_idx), .load_slot(load_slot), .last_round(last_round), .busy(busy));

  always #5 clk = ~clk;

  initial begin
    repeat (4000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  assign in_count  = 2'(in_avail);
  assign out_count = 3'(out_cnt);
  assign out_push  = (push_at.size() != 0) && (push_at[0] == cyc);

  // Model of buffers and core
  always @(posedge clk) begin
    if (rst_n) begin
      if (load_slot) begin
        in_avail <= in_avail - 1;
        push_at.push_back(cyc + 64);
      end
      if (out_push) begin
        void'(push_at.pop_front());
        out_cnt <= out_cnt + 1;
      end
    end
    cyc <= cyc + 1;
  end

  // Event log
  int setup_start, batch_start [$], loads [$], keys [$], key_idx_log [$], lasts [$];
  int setup_cycles = 0, setup_keys = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      if (setup) begin
        setup_cycles++;
        if (key_issue) begin
          checks++;
          if (key_idx != 5'(setup_keys % 4)) failures++;
          setup_keys++;
        end
      end else if (key_issue) begin
        keys.push_back(cyc);
        key_idx_log.push_back(int'(key_idx));
      end
      if (load_slot) loads.push_back(cyc);
      if (last_round) lasts.push_back(cyc);
      if (key_load) begin
        checks++;
        if (push_at.size() != 0) failures++;     // key taken while blocks in flight
      end
    end
  end

  task automatic check_batch(int b, bit dec, int nexp);
    int n;
    // subkey passes
    for (int r = 0; r < 16; r++) begin
      int k;
      k = -1;
      foreach (keys[i]) if (keys[i] == b + 4 * r) k = i;
      checks++;
      if (k < 0 || key_idx_log[k] != (dec ? 19 - r : 4 + r)) begin
        failures++;
        $display("batch %0d round %0d subkey pass missing or wrong", b, r);
      end
    end
    n = 0;
    foreach (loads[i]) if (loads[i] >= b && loads[i] < b + 64) begin
      n++;
      checks++;
      if (loads[i] < b + 1 || loads[i] > b + 3) failures++;
    end
    checks++;
    if (n != nexp) begin failures++; $display("batch %0d loads %0d exp %0d", b, n, nexp); end
    n = 0;
    foreach (lasts[i]) if (lasts[i] >= b && lasts[i] < b + 64) begin
      n++;
      checks++;
      if (lasts[i] < b + 60) failures++;
    end
    checks++;
    if (n != 4) failures++;
  endtask

  initial begin
    int b0, b1, b2;
    key_valid = 0; decrypt_in = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // key setup (encrypt)
    checks++;
    if (!key_ready) failures++;
    key_valid = 1;
    @(negedge clk);
    key_valid = 0;
    repeat (10) @(negedge clk);
    checks += 2;
    if (setup_cycles != 8) failures++;
    if (setup_keys != 4) failures++;
    // two full batches back to back
    in_avail = 3;
    wait (loads.size() == 3);
    @(negedge clk);
    in_avail = 3;
    wait (loads.size() == 6);
    repeat (140) @(negedge clk);
    out_cnt = 0;       // consumer empties the output buffer
    b0 = keys[0];
    b1 = keys[16];
    checks++;
    if (b1 != b0 + 64) begin failures++; $display("batches not back to back: %0d %0d", b0, b1); end
    check_batch(b0, 0, 3);
    check_batch(b1, 0, 3);
    // a batch limited by output room: 5 of 6 entries occupied
    out_cnt = 5;
    @(negedge clk);
    in_avail = 3;
    repeat (80) @(negedge clk);
    check_batch(keys[32], 0, 1);
    // new key with decrypt while idle
    wait (push_at.size() == 0);
    out_cnt = 0;
    in_avail = 0;
    @(negedge clk);
    checks++;
    if (!key_ready) failures++;
    decrypt_in = 1;
    key_valid = 1;
    @(negedge clk);
    key_valid = 0;
    decrypt_in = 0;
    repeat (10) @(negedge clk);
    checks++;
    if (!decrypt) failures++;
    in_avail = 2;
    repeat (5) @(negedge clk);
    key_valid = 1;       // must be refused while the batch is in flight
    repeat (50) @(negedge clk);
    key_valid = 0;
    repeat (20) @(negedge clk);
    b2 = keys[48];
    check_batch(b2, 1, 2);
    checks++;
    if (setup_keys != 8) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
