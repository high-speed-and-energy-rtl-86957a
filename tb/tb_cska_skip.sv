// tb_cska_skip: checks both forms of the skip gate over all inputs. The
// reference is the stage carry rule CO_j = C_j | (P_j & CO_{j-1}) worked
// out in true polarity; the AOI form gets true inputs and must return ~CO_j,
// the OAI form gets inverted inputs and must return CO_j.
module tb_cska_skip;
  logic c, p, ci;
  logic co_aoi, co_oai;
  int checks = 0, failures = 0;

  cska_skip #(.OAI(1'b0)) u_aoi (.c(c),  .p(p),  .ci(ci),  .co(co_aoi));
  cska_skip #(.OAI(1'b1)) u_oai (.c(~c), .p(~p), .ci(~ci), .co(co_oai));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic co_ref;
    for (int unsigned v = 0; v < 8; v++) begin
      {c, p, ci} = 3'(v);
      #1;
      // Carry generated in the stage, else passed on only when it propagates.
      if (c) co_ref = 1'b1;
      else if (p) co_ref = ci;
      else co_ref = 1'b0;
      checks++;
      if (co_aoi !== ~co_ref) begin
        failures++;
        $display("FAIL AOI c=%b p=%b ci=%b: co=%b, expected %b", c, p, ci, co_aoi, ~co_ref);
      end
      checks++;
      if (co_oai !== co_ref) begin
        failures++;
        $display("FAIL OAI c=%b p=%b ci=%b: co=%b, expected %b", c, p, ci, co_oai, co_ref);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
