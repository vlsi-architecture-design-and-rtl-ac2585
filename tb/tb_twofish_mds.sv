// tb_twofish_mds: random vectors through the two-stage MDS unit; each result
// is compared with a generic GF(2^8) matrix product exactly two cycles after
// its input, and holding en low must freeze the output.
module tb_twofish_mds;
  import twofish_ref_pkg::*;

  logic clk = 0, en;
  logic [31:0] y, z;
  logic [31:0] hist [$];
  int checks = 0, failures = 0;

  twofish_mds u_dut (.clk(clk), .en(en), .y(y), .z(z));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] held;
    en = 1'b1;
    for (int t = 0; t < 400; t++) begin
      y = (t < 8) ? (32'h1 << (4 * t)) : $urandom;
      hist.push_back(y);
      @(posedge clk);
      #1;
      if (hist.size() == 2) begin
        checks++;
        if (z != ref_mds(hist[0])) begin
          failures++;
          $display("y=%08h z=%08h exp %08h", hist[0], z, ref_mds(hist[0]));
        end
        void'(hist.pop_front());
      end
    end
    held = z;
    en = 1'b0;
    y = ~y;
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (z != held) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
