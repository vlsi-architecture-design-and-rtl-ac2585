// tb_twofish_pht: PHT outputs in both modes (plain input 2 for the round
// function, input 2 rotated left by 8 for subkey generation).
module tb_twofish_pht;
  import twofish_ref_pkg::*;

  logic [31:0] in1, in2, out1, out2;
  logic key_mode;
  int checks = 0, failures = 0;

  twofish_pht u_dut (.in1(in1), .in2(in2), .key_mode(key_mode), .out1(out1), .out2(out2));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      w32 b;
      in1 = $urandom; in2 = (t < 10) ? 32'h0000_00FF << t : $urandom; key_mode = t[0];
      #1;
      b = key_mode ? rol(in2, 8) : in2;
      checks += 2;
      if (out1 != in1 + b)     begin failures++; $display("out1 %08h", out1); end
      if (out2 != in1 + 2 * b) begin failures++; $display("out2 %08h", out2); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
