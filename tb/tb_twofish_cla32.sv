// tb_twofish_cla32: carry-lookahead adder against the + operator on corner
// cases (long carry chains, wrap-around) and random operands.
module tb_twofish_cla32;
  logic [31:0] a, b, s;
  int checks = 0, failures = 0;

  twofish_cla32 #(.WIDTH(32)) u_dut (.a(a), .b(b), .s(s));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [31:0] av, logic [31:0] bv);
    a = av; b = bv;
    #1;
    checks++;
    if (s != av + bv) begin
      failures++;
      $display("%08h + %08h = %08h exp %08h", av, bv, s, av + bv);
    end
  endtask

  initial begin
    check(32'hFFFF_FFFF, 32'h1);
    check(32'h7FFF_FFFF, 32'h1);
    check(32'h0FFF_FFFF, 32'h0000_0001);
    check(32'hFFFF_FFFF, 32'hFFFF_FFFF);
    check(32'h8000_0000, 32'h8000_0000);
    for (int i = 0; i < 32; i++) check(32'hFFFF_FFFF >> i, 32'h1 << (31 - i));
    for (int i = 0; i < 32; i++) check((32'h1 << i) - 1, 32'h1);
    for (int t = 0; t < 2000; t++) check($urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
