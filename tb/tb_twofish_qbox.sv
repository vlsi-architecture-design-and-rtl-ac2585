// tb_twofish_qbox: exhaustive check of q0 and q1 against the reference
// permutations, plus the first table entries known from the Twofish
// specification (q0(00)=A9, q1(00)=75) and a bijectivity check.
module tb_twofish_qbox;
  import twofish_ref_pkg::*;

  logic [7:0] x, y0, y1;
  int checks = 0, failures = 0;
  bit seen0 [256], seen1 [256];

  twofish_qbox #(.Q_SEL(1'b0)) u_q0 (.x(x), .y(y0));
  twofish_qbox #(.Q_SEL(1'b1)) u_q1 (.x(x), .y(y1));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      x = 8'(v);
      #1;
      checks += 2;
      if (y0 != ref_q(0, x)) begin failures++; $display("q0(%02h)=%02h exp %02h", x, y0, ref_q(0, x)); end
      if (y1 != ref_q(1, x)) begin failures++; $display("q1(%02h)=%02h exp %02h", x, y1, ref_q(1, x)); end
      seen0[y0] = 1'b1;
      seen1[y1] = 1'b1;
      if (v == 0) begin
        checks += 2;
        if (y0 != 8'hA9) failures++;
        if (y1 != 8'h75) failures++;
      end
      if (v == 255) begin
        checks += 2;
        if (y0 != 8'hE0) failures++;   // q0(FF)
        if (y1 != 8'h91) failures++;   // q1(FF)
      end
    end
    for (int v = 0; v < 256; v++) begin
      checks++;
      if (!seen0[v] || !seen1[v]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
