// tb_twofish_h: the pipelined h function with a 128-bit key: random inputs
// and key words each cycle, results checked three cycles later against the
// reference h.
module tb_twofish_h;
  import twofish_ref_pkg::*;

  logic clk = 0;
  logic [31:0] x, z;
  logic [1:0][31:0] l;
  typedef struct { w32 x; w32 l0; w32 l1; } vec_t;
  vec_t hist [$];
  int checks = 0, failures = 0;

  twofish_h #(.KEY_BITS(128)) u_dut (.clk(clk), .en(1'b1), .x(x), .l(l), .z(z));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      x = $urandom;
      l[0] = (t < 3) ? '0 : $urandom;
      l[1] = (t < 3) ? '0 : $urandom;
      hist.push_back('{x, l[0], l[1]});
      @(posedge clk);
      #1;
      if (hist.size() == 3) begin
        w32 lv [];
        lv = new[2];
        lv[0] = hist[0].l0;
        lv[1] = hist[0].l1;
        checks++;
        if (z != ref_h(hist[0].x, lv, 2)) begin
          failures++;
          $display("h(%08h)=%08h exp %08h", hist[0].x, z, ref_h(hist[0].x, lv, 2));
        end
        void'(hist.pop_front());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
