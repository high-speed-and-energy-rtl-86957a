// tb_cska_bk_ppa: exhaustive check of the Brent-Kung nucleus adder at
// W = 8 (the default nucleus size, a power-of-two tree of 16 positions after
// the carry input is folded in) and at W = 5 and W = 7, where the tree is
// padded. Expected values come from integer addition.
module tb_cska_bk_ppa;
  logic [7:0] a8, b8, s8;
  logic [4:0] a5, b5, s5;
  logic [6:0] a7, b7, s7;
  logic cin, c8, c5, c7, p8, p5, p7;
  int checks = 0, failures = 0;

  cska_bk_ppa #(.W(8)) u8 (.a(a8), .b(b8), .cin(cin), .s(s8), .cout(c8), .p_grp(p8));
  cska_bk_ppa #(.W(5)) u5 (.a(a5), .b(b5), .cin(cin), .s(s5), .cout(c5), .p_grp(p5));
  cska_bk_ppa #(.W(7)) u7 (.a(a7), .b(b7), .cin(cin), .s(s7), .cout(c7), .p_grp(p7));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string tag, int unsigned w, int unsigned av, int unsigned bv,
                       int unsigned cv, int unsigned sv, bit co, bit po);
    int unsigned total = av + bv + cv;
    int unsigned mask = (1 << w) - 1;
    bit pexp = ((av ^ bv) == mask);
    checks++;
    if (sv != (total & mask) || co != total[w] || po != pexp) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s a=%h b=%h cin=%0d: s=%h co=%b p=%b", tag, av, bv, cv, sv, co, po);
    end
  endtask

  initial begin
    for (int unsigned ai = 0; ai < 256; ai++)
      for (int unsigned bi = 0; bi < 256; bi++)
        for (int unsigned cv = 0; cv < 2; cv++) begin
          a8 = 8'(ai); b8 = 8'(bi); cin = cv[0];
          a5 = 5'(ai); b5 = 5'(bi);
          a7 = 7'(ai); b7 = 7'(bi);
          #1;
          check("W8", 8, ai, bi, cv, s8, c8, p8);
          if (ai < 32 && bi < 32) check("W5", 5, ai, bi, cv, s5, c5, p5);
          if (ai < 128 && bi < 128) check("W7", 7, ai, bi, cv, s7, c7, p7);
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
