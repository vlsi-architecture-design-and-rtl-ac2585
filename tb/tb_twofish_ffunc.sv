// tb_twofish_ffunc: the shared F unit in both of its uses.
// 1) Subkey passes i = 0..19 issued back to back for random keys: each pair
//    must equal K(2i), K(2i+1) of the reference key schedule, four cycles
//    after issue.
// 2) Round use: a subkey pass for pair i followed one cycle later by data
//    passes; F0/F1 must equal T0+T1+K(2i) and T0+2T1+K(2i+1) with
//    T0 = g(R0), T1 = g(ROL(R1,8)), four cycles after issue.
module tb_twofish_ffunc;
  import twofish_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic issue, issue_key;
  logic [4:0] key_idx;
  logic [31:0] x0, x1, f0, f1, sk0, sk1;
  logic [1:0][31:0] s_words, me, mo;
  logic out_valid, sk_valid;
  logic [4:0] sk_idx;
  int checks = 0, failures = 0;

  twofish_ffunc #(.KEY_BITS(128)) u_dut (
    .clk(clk), .rst_n(rst_n), .issue(issue), .issue_key(issue_key), .key_idx(key_idx),
    .x0(x0), .x1(x1), .s_words(s_words), .me(me), .mo(mo),
    .out_valid(out_valid), .f0(f0), .f1(f1),
    .sk_valid(sk_valid), .sk_idx(sk_idx), .sk0(sk0), .sk1(sk1));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  ks_t ks;
  // expected results, in issue order, with the cycle they must appear
  typedef struct { bit key; int idx; w32 e0; w32 e1; int due; } exp_t;
  exp_t q [$];
  int cyc = 0;

  always @(posedge clk) cyc <= cyc + 1;

  // Checker: compare whatever arrives with the oldest expectation
  always @(posedge clk) begin
    #1;
    if (rst_n && (out_valid || sk_valid)) begin
      checks++;
      if (q.size() == 0) failures++;
      else begin
        exp_t e;
        e = q.pop_front();
        if (e.key != sk_valid || (e.key && (sk0 != e.e0 || sk1 != e.e1 || sk_idx != 5'(e.idx)))
            || (!e.key && (f0 != e.e0 || f1 != e.e1)) || cyc != e.due) begin
          failures++;
          $display("mismatch key=%0d idx=%0d got %08h %08h / %08h %08h exp %08h %08h cyc %0d due %0d",
                   e.key, e.idx, sk0, sk1, f0, f1, e.e0, e.e1, cyc, e.due);
        end
      end
    end
  end

  initial begin
    logic [255:0] key;
    issue = 0; issue_key = 0; key_idx = 0; x0 = 0; x1 = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 4; trial++) begin
      key = '0;
      if (trial > 0) key[127:0] = {$urandom, $urandom, $urandom, $urandom};
      ks = ref_keysched(key, 128);
      @(negedge clk);
      for (int i = 0; i < 2; i++) begin
        s_words[i] = ks.S[i]; me[i] = ks.Me[i]; mo[i] = ks.Mo[i];
      end
      // subkey passes, one per cycle
      for (int i = 0; i < 20; i++) begin
        issue = 1; issue_key = 1; key_idx = 5'(i);
        q.push_back('{1'b1, i, ks.K[2*i], ks.K[2*i+1], cyc + 4});
        @(negedge clk);
      end
      issue = 0; issue_key = 0;
      repeat (6) @(negedge clk);
      // round use: subkey pass then three data passes, repeated
      for (int r = 0; r < 16; r++) begin
        int i;
        i = 4 + r;
        issue = 1; issue_key = 1; key_idx = 5'(i);
        q.push_back('{1'b1, i, ks.K[2*i], ks.K[2*i+1], cyc + 4});
        @(negedge clk);
        for (int s = 0; s < 3; s++) begin
          w32 t0, t1;
          issue = 1; issue_key = 0; x0 = $urandom; x1 = $urandom;
          t0 = ref_h(x0, ks.S, 2);
          t1 = ref_h(rol(x1, 8), ks.S, 2);
          q.push_back('{1'b0, i, t0 + t1 + ks.K[2*i], t0 + 2 * t1 + ks.K[2*i+1], cyc + 4});
          @(negedge clk);
        end
      end
      issue = 0;
      repeat (6) @(negedge clk);
    end
    checks++;
    if (q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
