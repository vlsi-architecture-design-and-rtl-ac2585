// twofish_control: sequencer of the folded Twofish core.
//
// After a key is accepted (key_load) the controller runs a short setup: four
// subkey passes, issued on consecutive cycles, produce the whitening subkeys
// K0..K7 (setup is high while they come back). Blocks are then processed in
// batches. A batch lasts 64 cycles: 16 periods of 4 cycles, one period per
// round, matching the four-stage F-function pipeline. In cycle 0 of every
// period the controller issues the subkey pass for that round's pair
// (index r+4 for encryption, 19-r for decryption); cycles 1..3 belong to up to
// three data blocks, which are loaded from the input buffer in period 0 and
// fed back round after round by the core. last_round marks the data passes of
// period 15; their results leave the core 4 cycles later, which are cycles
// 1..3 of the next batch, so batches follow each other without a gap.
// The batch size is decided in the last cycle of a batch (or while ready):
// as many blocks as are waiting, up to three, but never more than the output
// buffer can take together with the blocks still in flight, so the core never
// stalls. A new key (with the decrypt mode) is accepted only when no block is
// in flight. The schedule is this design's own; the design only fixes the
// folded one-round loop, the four-stage pipeline and the reuse of the F unit
// for subkey generation.
module twofish_control
  import twofish_pkg::*;
#(
  parameter int unsigned IN_DEPTH  = 3,
  parameter int unsigned OUT_DEPTH = 6
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            key_valid,
  output logic                            key_ready,
  input  logic                            decrypt_in,
  input  logic [$clog2(IN_DEPTH+1)-1:0]   in_count,
  input  logic [$clog2(OUT_DEPTH+1)-1:0]  out_count,
  input  logic                            out_push,
  output logic                            key_load,
  output logic                            decrypt,
  output logic                            setup,
  output logic                            key_issue,
  output logic [4:0]                      key_idx,
  output logic                            load_slot,
  output logic                            last_round,
  output logic                            busy
);

  typedef enum logic [1:0] {S_IDLE, S_SETUP, S_READY, S_RUN} state_t;

  state_t     state;
  logic [5:0] cnt;          // cycle within setup or batch
  logic [1:0] nblk;         // blocks in the running batch
  logic [2:0] inflight;     // blocks loaded and not yet pushed out
  logic [1:0] n_next;       // size of the batch that would start now

  logic [1:0] phase;
  logic [3:0] period;

  assign phase  = cnt[1:0];
  assign period = cnt[5:2];

  always_comb begin
    int room;
    int avail;
    room  = int'(OUT_DEPTH) - int'(out_count) - int'(inflight);
    avail = int'(in_count);
    if (room < avail) avail = room;
    if (avail > int'(DATA_SLOTS)) avail = int'(DATA_SLOTS);
    if (avail < 0) avail = 0;
    n_next = 2'(avail);
  end

  assign key_ready = (state == S_IDLE || state == S_READY) && inflight == '0;
  assign key_load  = key_valid && key_ready;
  assign busy      = (state == S_SETUP) || (state == S_RUN) || inflight != '0;

  always_comb begin
    key_issue  = 1'b0;
    key_idx    = '0;
    load_slot  = 1'b0;
    last_round = 1'b0;
    setup      = (state == S_SETUP);
    case (state)
      S_SETUP: begin
        key_issue = (cnt < 6'd4);
        key_idx   = 5'(cnt[1:0]);
      end
      S_RUN: begin
        key_issue  = (phase == 2'd0);
        key_idx    = decrypt ? 5'(19 - int'(period)) : 5'(4 + int'(period));
        load_slot  = (period == 4'd0) && (phase != 2'd0) && (phase <= nblk);
        last_round = (period == 4'(ROUNDS - 1));
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      cnt      <= '0;
      nblk     <= '0;
      inflight <= '0;
      decrypt  <= 1'b0;
    end else begin
      inflight <= inflight + (load_slot ? 3'd1 : 3'd0) - (out_push ? 3'd1 : 3'd0);
      case (state)
        S_IDLE, S_READY: begin
          cnt <= '0;
          if (key_load) begin
            state   <= S_SETUP;
            decrypt <= decrypt_in;
          end else if (state == S_READY && n_next != '0) begin
            state <= S_RUN;
            nblk  <= n_next;
          end
        end
        S_SETUP: begin
          // the last subkey pass (issued at cnt 3) reports at cnt 7
          cnt <= cnt + 1'b1;
          if (cnt == 6'd7) state <= S_READY;
        end
        S_RUN: begin
          cnt <= cnt + 1'b1;
          if (cnt == 6'd63) begin
            if (n_next != '0) nblk <= n_next;
            else              state <= S_READY;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
