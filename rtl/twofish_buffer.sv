// twofish_buffer: small first-in first-out buffer for 128-bit blocks, used as
// the input registers and the output registers around the cipher core.
//
// Valid/ready on both sides: a word is written when in_valid && in_ready and
// read when out_valid && out_ready; both may happen in the same cycle. out_data
// shows the oldest entry whenever out_valid is high. count is the occupancy.
// DEPTH is this design's choice: the input side holds one batch of blocks, the
// output side two, so that back-to-back batches never wait for the consumer.
module twofish_buffer #(
  parameter int unsigned DEPTH = 3,
  parameter int unsigned WIDTH = 128
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        in_valid,
  output logic                        in_ready,
  input  logic [WIDTH-1:0]            in_data,
  output logic                        out_valid,
  input  logic                        out_ready,
  output logic [WIDTH-1:0]            out_data,
  output logic [$clog2(DEPTH+1)-1:0]  count
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    rd_ptr, wr_ptr;
  logic             wr, rd;

  assign in_ready  = (count != DEPTH[$clog2(DEPTH+1)-1:0]);
  assign out_valid = (count != '0);
  assign out_data  = mem[rd_ptr];
  assign wr        = in_valid && in_ready;
  assign rd        = out_valid && out_ready;

  function automatic logic [AW-1:0] next_ptr(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (wr) wr_ptr <= next_ptr(wr_ptr);
      if (rd) rd_ptr <= next_ptr(rd_ptr);
      count <= count + ($clog2(DEPTH+1))'(wr) - ($clog2(DEPTH+1))'(rd);
    end
  end

  always_ff @(posedge clk) begin
    if (wr) mem[wr_ptr] <= in_data;
  end

endmodule
