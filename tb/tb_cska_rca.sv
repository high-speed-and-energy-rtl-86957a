// tb_cska_rca: exhaustive check of the ripple-carry block for W = 4: every
// a, b and cin. The expected sum and carry come from integer addition and
// the expected group propagate from a bit-by-bit loop.
module tb_cska_rca;
  localparam int unsigned W = 4;
  logic [W-1:0] a, b, s;
  logic cin, cout, p_grp;
  int checks = 0, failures = 0;

  cska_rca #(.W(W)) dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout), .p_grp(p_grp));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned total;
    bit prop;
    for (int unsigned ai = 0; ai < (1 << W); ai++)
      for (int unsigned bi = 0; bi < (1 << W); bi++)
        for (int unsigned ci = 0; ci < 2; ci++) begin
          a = W'(ai); b = W'(bi); cin = ci[0];
          #1;
          total = ai + bi + ci;
          prop = 1'b1;
          for (int unsigned i = 0; i < W; i++) if (a[i] == b[i]) prop = 1'b0;
          checks++;
          if (s !== W'(total) || cout !== total[W] || p_grp !== prop) begin
            failures++;
            if (failures < 10)
              $display("FAIL a=%h b=%h cin=%b: s=%h cout=%b p=%b, expected %h %b %b",
                       a, b, cin, s, cout, p_grp, W'(total), total[W], prop);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
