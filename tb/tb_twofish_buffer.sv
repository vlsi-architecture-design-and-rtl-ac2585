// tb_twofish_buffer: random pushes and pops on a depth-3 buffer compared with
// a queue model: order of data, ready/valid flags and occupancy count, and
// that full and empty are both reached.
module tb_twofish_buffer;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [127:0] in_data, out_data;
  logic [1:0] count;
  logic [127:0] model [$];
  int checks = 0, failures = 0, fulls = 0, empties = 0;

  twofish_buffer #(.DEPTH(3), .WIDTH(128)) u_dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready), .in_data(in_data),
    .out_valid(out_valid), .out_ready(out_ready), .out_data(out_data), .count(count));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit pop, push;
    in_valid = 0; out_ready = 0; in_data = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      in_valid  = ($urandom % 4) < ((t / 500) % 2 ? 1 : 3);
      out_ready = ($urandom % 4) < ((t / 500) % 2 ? 3 : 1);
      in_data   = {$urandom, $urandom, $urandom, $urandom};
      #1;
      checks += 3;
      if (in_ready != (model.size() < 3)) failures++;
      if (out_valid != (model.size() > 0)) failures++;
      if (count != 2'(model.size())) failures++;
      if (model.size() == 3) fulls++;
      if (model.size() == 0) empties++;
      if (out_valid && out_ready) begin
        checks++;
        if (out_data != model[0]) failures++;
      end
      pop  = out_valid && out_ready;
      push = in_valid && in_ready;
      @(posedge clk);
      if (pop) void'(model.pop_front());
      if (push) model.push_back(in_data);
      @(negedge clk);
    end
    checks += 2;
    if (fulls == 0) failures++;
    if (empties == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
