// twofish_top: Twofish block cipher core, 128-bit blocks, loop-folded.
//
// Around the core datapath sit the input registers (a three-block buffer),
// the output registers (a six-block buffer), the session-key unit and the
// controller. Usage: present a key with key_valid while key_ready is high,
// together with decrypt (0 = encrypt, 1 = decrypt); the mode holds until the
// next key. After 8 cycles of subkey setup, blocks are accepted on
// in_valid/in_ready and the results leave in the same order on
// out_valid/out_ready. Blocks and keys are byte strings with byte 0 in the
// most significant bits, as in the usual Twofish test vectors.
// Timing: a batch of up to three blocks takes 64 cycles; a lone block
// appears on out_valid about 67 cycles after it is accepted. With a steady
// supply the core finishes three blocks every 64 cycles.
// Reset is asynchronous and active low; it is this design's choice, as are the
// handshakes.
// Lint may report rst_n as used both synchronously and asynchronously: the
// assertions below sample it in their disable condition at the clock edge,
// while every flip-flop uses it only as an asynchronous reset.
module twofish_top
  import twofish_pkg::*;
#(
  parameter int unsigned KEY_BITS = 128
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 key_valid,
  output logic                 key_ready,
  input  logic [KEY_BITS-1:0]  key,
  input  logic                 decrypt,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  block_t               in_data,
  output logic                 out_valid,
  input  logic                 out_ready,
  output block_t               out_data,
  output logic                 busy
);

  localparam int unsigned KW        = KEY_BITS / 64;
  localparam int unsigned IN_DEPTH  = DATA_SLOTS;
  localparam int unsigned OUT_DEPTH = 2 * DATA_SLOTS;

  logic [KW-1:0][31:0]               s_words, me, mo;
  logic                              key_load, dec_mode, setup, key_issue, load_slot, last_round;
  logic [4:0]                        key_idx;
  logic [$clog2(IN_DEPTH+1)-1:0]     in_count;
  logic [$clog2(OUT_DEPTH+1)-1:0]    out_count;
  block_t                            core_in, core_out;
  logic                              core_push, core_busy, ctrl_busy;
  logic                              ib_valid, ob_ready;

  twofish_keydep #(.KEY_BITS(KEY_BITS)) u_keydep (
    .clk(clk), .rst_n(rst_n), .load(key_load), .key(key),
    .s_words(s_words), .me(me), .mo(mo)
  );

  twofish_buffer #(.DEPTH(IN_DEPTH), .WIDTH(128)) u_inbuf (
    .clk(clk), .rst_n(rst_n),
    .in_valid(in_valid), .in_ready(in_ready), .in_data(in_data),
    .out_valid(ib_valid), .out_ready(load_slot), .out_data(core_in),
    .count(in_count)
  );

  twofish_control #(.IN_DEPTH(IN_DEPTH), .OUT_DEPTH(OUT_DEPTH)) u_ctrl (
    .clk(clk), .rst_n(rst_n),
    .key_valid(key_valid), .key_ready(key_ready), .decrypt_in(decrypt),
    .in_count(in_count), .out_count(out_count), .out_push(core_push),
    .key_load(key_load), .decrypt(dec_mode), .setup(setup),
    .key_issue(key_issue), .key_idx(key_idx), .load_slot(load_slot),
    .last_round(last_round), .busy(ctrl_busy)
  );

  twofish_core #(.KEY_BITS(KEY_BITS)) u_core (
    .clk(clk), .rst_n(rst_n),
    .s_words(s_words), .me(me), .mo(mo),
    .decrypt(dec_mode), .setup(setup), .key_issue(key_issue), .key_idx(key_idx),
    .load_slot(load_slot), .last_round(last_round),
    .in_data(core_in), .out_data(core_out), .out_push(core_push), .busy(core_busy)
  );

  twofish_buffer #(.DEPTH(OUT_DEPTH), .WIDTH(128)) u_outbuf (
    .clk(clk), .rst_n(rst_n),
    .in_valid(core_push), .in_ready(ob_ready), .in_data(core_out),
    .out_valid(out_valid), .out_ready(out_ready), .out_data(out_data),
    .count(out_count)
  );

  assign busy = ctrl_busy || core_busy;

  a_pop_valid: assert property (@(posedge clk) disable iff (!rst_n) load_slot |-> ib_valid);
  a_push_room: assert property (@(posedge clk) disable iff (!rst_n) core_push |-> ob_ready);

endmodule
