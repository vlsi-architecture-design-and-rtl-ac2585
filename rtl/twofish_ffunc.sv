// twofish_ffunc: the shared F-function unit of the folded Twofish datapath.
//
// One pass through the unit evaluates two h functions in parallel, the
// Pseudo-Hadamard transform and the subkey additions. The unit serves two
// kinds of pass, chosen per issue:
//
//   data pass   (issue_key=0): T0 = h(x0, S), T1 = h(ROL(x1,8), S);
//               F0 = T0 + T1 + Kr0,  F1 = T0 + 2*T1 + Kr1
//   subkey pass (issue_key=1): A = h(2i*0x01010101, Me), B' = h((2i+1)*0x01010101, Mo);
//               B = ROL(B',8); Kr0 <= A + B; Kr1 <= ROL(A + 2*B, 9)
//
// Kr0/Kr1 are the two round-subkey registers. A subkey pass writes them and
// reports the pair on sk0/sk1 with its index i (the pair K(2i), K(2i+1)); a
// data pass reads them. So the S-boxes, MDS and PHT are reused for both the
// encryption datapath and the subkey generation, and subkeys are produced on
// the fly rather than stored for all rounds.
//
// Timing: four pipeline stages, one pass may be issued every cycle. A pass
// issued in cycle c has its S-box outputs registered at the end of c, the two
// MDS stages at the end of c+1 and c+2, and the PHT plus subkey addition
// registered at the end of c+3; out_valid/f0/f1 or sk_valid/sk0/sk1 are seen
// in cycle c+4. A data pass reads Kr0/Kr1 in its fourth cycle, so a subkey
// pass issued up to three cycles before it already supplies its subkeys.
// The input multiplexer with the 8-bit rotation, the two registers ahead of
// the PHT and the rotate-by-9 into the second round-subkey register follow the
// block diagram of the design; the split of logic into stages is this
// design's choice.
module twofish_ffunc
  import twofish_pkg::*;
#(
  parameter int unsigned KEY_BITS = 128
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          issue,
  input  logic                          issue_key,
  input  logic [4:0]                    key_idx,
  input  word_t                         x0,
  input  word_t                         x1,
  input  logic [KEY_BITS/64-1:0][31:0]  s_words,
  input  logic [KEY_BITS/64-1:0][31:0]  me,
  input  logic [KEY_BITS/64-1:0][31:0]  mo,
  output logic                          out_valid,
  output word_t                         f0,
  output word_t                         f1,
  output logic                          sk_valid,
  output logic [4:0]                    sk_idx,
  output word_t                         sk0,
  output word_t                         sk1
);

  localparam int unsigned KW = KEY_BITS / 64;

  typedef struct packed {
    logic       valid;
    logic       key;
    logic [4:0] idx;
  } tag_t;

  word_t                 h0_x, h1_x, t0, t1;
  logic [KW-1:0][31:0]   h0_l, h1_l;
  logic [7:0]            i2;
  tag_t                  tag [1:3];

  // Input multiplexers: key-schedule constants or the left half of the block
  always_comb begin
    i2 = {2'b00, key_idx, 1'b0};
    if (issue_key) begin
      h0_x = {4{i2}};
      h1_x = {4{i2 | 8'd1}};
      h0_l = me;
      h1_l = mo;
    end else begin
      h0_x = x0;
      h1_x = rol32(x1, 8);
      h0_l = s_words;
      h1_l = s_words;
    end
  end

  twofish_h #(.KEY_BITS(KEY_BITS)) u_h0 (.clk(clk), .en(1'b1), .x(h0_x), .l(h0_l), .z(t0));
  twofish_h #(.KEY_BITS(KEY_BITS)) u_h1 (.clk(clk), .en(1'b1), .x(h1_x), .l(h1_l), .z(t1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tag[1] <= '0;
      tag[2] <= '0;
      tag[3] <= '0;
    end else begin
      tag[1] <= '{valid: issue, key: issue_key, idx: key_idx};
      tag[2] <= tag[1];
      tag[3] <= tag[2];
    end
  end

  // Stage 4: PHT, then either the round-subkey registers or the subkey adders
  word_t pht1, pht2, sum0, sum1;

  twofish_pht u_pht (.in1(t0), .in2(t1), .key_mode(tag[3].key), .out1(pht1), .out2(pht2));

  twofish_cla32 #(.WIDTH(32)) u_kadd0 (.a(pht1), .b(sk0), .s(sum0));
  twofish_cla32 #(.WIDTH(32)) u_kadd1 (.a(pht2), .b(sk1), .s(sum1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      sk_valid  <= 1'b0;
      sk_idx    <= '0;
      sk0       <= '0;
      sk1       <= '0;
      f0        <= '0;
      f1        <= '0;
    end else begin
      out_valid <= tag[3].valid && !tag[3].key;
      sk_valid  <= tag[3].valid &&  tag[3].key;
      if (tag[3].valid && tag[3].key) begin
        sk_idx <= tag[3].idx;
        sk0    <= pht1;
        sk1    <= rol32(pht2, 9);
      end
      if (tag[3].valid && !tag[3].key) begin
        f0 <= sum0;
        f1 <= sum1;
      end
    end
  end

endmodule
