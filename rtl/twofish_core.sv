// twofish_core: loop-folded Twofish datapath (one round in hardware).
//
// A block is held as four 32-bit words R0..R3. Its state circulates through a
// four-stage shift register while its left half (R0,R1) passes through the
// four-stage F-function unit alongside, so after four cycles the round can be
// completed at the end of the loop:
//   encryption:  R2' = ROR(R2 ^ F0, 1),  R3' = ROL(R3, 1) ^ F1
//   decryption:  R2' = ROL(R2, 1) ^ F0,  R3' = ROR(R3 ^ F1, 1)
// and the halves are swapped, (R0,R1,R2,R3) <= (R2',R3',R0,R1). The swapped
// state re-enters the loop through the feedback multiplexer at the head for
// the next round, or, after the last round, is unswapped and output-whitened.
// Four slots circulate: slot 0 carries the subkey pass that the controller
// issues for the round, slots 1..3 carry up to three blocks.
//
// Whitening: a block entering from the input is XORed with four subkeys
// (K0..K3 for encryption, K4..K7 for decryption) and a finished block with the
// other four. These eight subkeys are produced by the F unit during key setup
// and kept in registers; the round subkeys are produced on the fly, one pair
// per round. Ports in_data/out_data have byte 0 in bits 127:120.
//
// Timing: a block loaded in cycle t of a batch (t = 1..3) is pushed out on
// out_push in cycle t+64. The round structure, the shift registers beside the
// F unit and the feedback follow the block diagrams of the design; whitening
// registers and slot assignment are this design's choices.
// Lint may report rst_n as used both synchronously and asynchronously: the
// assertions below sample it in their disable condition at the clock edge,
// while every flip-flop uses it only as an asynchronous reset.
module twofish_core
  import twofish_pkg::*;
#(
  parameter int unsigned KEY_BITS = 128
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [KEY_BITS/64-1:0][31:0]  s_words,
  input  logic [KEY_BITS/64-1:0][31:0]  me,
  input  logic [KEY_BITS/64-1:0][31:0]  mo,
  input  logic                          decrypt,
  input  logic                          setup,
  input  logic                          key_issue,
  input  logic [4:0]                    key_idx,
  input  logic                          load_slot,
  input  logic                          last_round,
  input  block_t                        in_data,
  output block_t                        out_data,
  output logic                          out_push,
  output logic                          busy
);

  slot_t   st [1:PIPE_DEPTH];     // shift register beside the F unit
  slot_t   head;
  words4_t tail_w, in_w, out_w;
  word_t   wk [8];                // whitening subkeys K0..K7

  logic    f_valid, sk_valid;
  word_t   f0, f1, sk0, sk1;
  logic [4:0] sk_idx;

  // End of the loop: complete the round and swap
  always_comb begin
    words4_t s;
    s = st[PIPE_DEPTH].w;
    if (!decrypt) begin
      tail_w[0] = ror32(s[2] ^ f0, 1);
      tail_w[1] = rol32(s[3], 1) ^ f1;
    end else begin
      tail_w[0] = rol32(s[2], 1) ^ f0;
      tail_w[1] = ror32(s[3] ^ f1, 1);
    end
    tail_w[2] = s[0];
    tail_w[3] = s[1];
  end

  // Input and output whitening
  always_comb begin
    words4_t blk;
    blk = block_to_words(in_data);
    for (int i = 0; i < 4; i++) begin
      in_w[i]  = blk[i] ^ (decrypt ? wk[i + 4] : wk[i]);
      out_w[i] = tail_w[(i + 2) % 4] ^ (decrypt ? wk[i] : wk[i + 4]);
    end
  end

  // Head of the loop: feedback, or a new block from the input
  always_comb begin
    head = '0;
    if (st[PIPE_DEPTH].valid && !st[PIPE_DEPTH].last) begin
      head.valid = 1'b1;
      head.last  = last_round;
      head.w     = tail_w;
    end else if (load_slot) begin
      head.valid = 1'b1;
      head.last  = 1'b0;
      head.w     = in_w;
    end
  end

  assign out_push = st[PIPE_DEPTH].valid && st[PIPE_DEPTH].last;
  assign out_data = words_to_block(out_w);

  always_comb begin
    busy = 1'b0;
    for (int k = 1; k <= PIPE_DEPTH; k++) busy |= st[k].valid;
  end

  twofish_ffunc #(.KEY_BITS(KEY_BITS)) u_f (
    .clk(clk), .rst_n(rst_n),
    .issue(head.valid || key_issue), .issue_key(key_issue), .key_idx(key_idx),
    .x0(head.w[0]), .x1(head.w[1]),
    .s_words(s_words), .me(me), .mo(mo),
    .out_valid(f_valid), .f0(f0), .f1(f1),
    .sk_valid(sk_valid), .sk_idx(sk_idx), .sk0(sk0), .sk1(sk1)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 1; k <= PIPE_DEPTH; k++) st[k] <= '0;
    end else begin
      st[1] <= head;
      for (int k = 2; k <= PIPE_DEPTH; k++) st[k] <= st[k-1];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 8; i++) wk[i] <= '0;
    end else if (setup && sk_valid && sk_idx < 5'd4) begin
      wk[2*sk_idx[1:0]]     <= sk0;
      wk[2*sk_idx[1:0] + 1] <= sk1;
    end
  end

  // A block slot and a subkey pass never share a cycle, and the F result
  // always arrives together with its block at the end of the loop.
  a_no_collision: assert property (@(posedge clk) disable iff (!rst_n)
    !(key_issue && head.valid));
  a_aligned: assert property (@(posedge clk) disable iff (!rst_n)
    st[PIPE_DEPTH].valid == f_valid);
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
    !(load_slot && st[PIPE_DEPTH].valid && !st[PIPE_DEPTH].last));

endmodule
