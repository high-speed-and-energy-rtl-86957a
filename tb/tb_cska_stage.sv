// tb_cska_stage: exhaustive check of a 5-bit CI-CSKA stage in both of its
// forms (AOI stage: true carry in, inverted carry out; OAI stage: inverted
// carry in, true carry out). Expected sum and carry out come from integer
// addition of a, b and the true incoming carry. Counts how often the carry
// out was produced by each of the three cases of the skip rule (generated,
// skipped, killed) and fails if one never occurred.
module tb_cska_stage;
  localparam int unsigned W = 5;
  logic [W-1:0] a, b, s_aoi, s_oai;
  logic ci, co_aoi, co_oai;
  int checks = 0, failures = 0;
  int n_gen = 0, n_skip = 0, n_kill = 0;

  cska_stage #(.W(W), .OAI(1'b0)) u_aoi (.a(a), .b(b), .ci(ci),  .s(s_aoi), .co(co_aoi));
  cska_stage #(.W(W), .OAI(1'b1)) u_oai (.a(a), .b(b), .ci(~ci), .s(s_oai), .co(co_oai));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned total, nocarry;
    for (int unsigned ai = 0; ai < (1 << W); ai++)
      for (int unsigned bi = 0; bi < (1 << W); bi++)
        for (int unsigned cv = 0; cv < 2; cv++) begin
          a = W'(ai); b = W'(bi); ci = cv[0];
          #1;
          total   = ai + bi + cv;
          nocarry = ai + bi;
          if (nocarry >= (1 << W)) n_gen++;
          else if ((ai ^ bi) == (1 << W) - 1) n_skip++;
          else n_kill++;
          checks++;
          if (s_aoi !== W'(total) || co_aoi !== ~total[W]) begin
            failures++;
            if (failures < 10)
              $display("FAIL AOI a=%h b=%h ci=%b: s=%h co=%b", a, b, ci, s_aoi, co_aoi);
          end
          checks++;
          if (s_oai !== W'(total) || co_oai !== total[W]) begin
            failures++;
            if (failures < 10)
              $display("FAIL OAI a=%h b=%h ci=%b: s=%h co=%b", a, b, ci, s_oai, co_oai);
          end
        end
    $display("carry cases: generated=%0d skipped=%0d killed=%0d", n_gen, n_skip, n_kill);
    if (n_gen == 0 || n_skip == 0 || n_kill == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
