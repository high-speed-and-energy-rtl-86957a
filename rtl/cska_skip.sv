// cska_skip: the carry skip logic of one CI-CSKA stage, a single compound
// gate instead of a 2:1 multiplexer.
//
// The stage carry follows CO_j = C_j | (P_j & CO_{j-1}): a carry generated
// inside the stage's RCA block (C_j = 1) forces it to one; otherwise it is
// the previous stage carry when the whole stage propagates (P_j = 1), and zero
// when it does not. Both gate forms invert, so the carry alternates polarity
// along the chain and no inverter is needed between stages:
//   OAI = 0 (AOI21): inputs in true polarity, output CO_j inverted
//                    co = ~(c | (p & ci))
//   OAI = 1 (OAI21): inputs inverted, output CO_j in true polarity
//                    co = ~(c & (p | ci))   with c = ~C_j, p = ~P_j, ci = ~CO_{j-1}
// Even stages use the AOI form and odd stages (from stage 3) the OAI form.
//
// Interface: c, p, ci in the polarity above; co. Timing: one gate.
module cska_skip #(
  parameter bit OAI = 1'b0
) (
  input  logic c,
  input  logic p,
  input  logic ci,
  output logic co
);
  if (OAI) begin : g_oai
    assign co = ~(c & (p | ci));
  end else begin : g_aoi
    assign co = ~(c | (p & ci));
  end
endmodule
