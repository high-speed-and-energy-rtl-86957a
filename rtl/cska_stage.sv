// cska_stage: one stage j (j >= 2) of the concatenation-incrementation carry
// skip adder.
//
// The stage holds three parts:
//   * a W-bit RCA block whose carry input is zero, so it computes its partial
//     sum, its own carry C_j and its group propagate P_j without waiting for
//     the previous stage (concatenation);
//   * an incrementation block that adds the incoming stage carry CO_{j-1} to
//     the partial sum (incrementation);
//   * the skip logic, one AOI or OAI gate, giving
//     CO_j = C_j | (P_j & CO_{j-1}).
// Because the skip gates invert, the carry between stages alternates
// polarity. With OAI = 0 (AOI stage, even j) ci is CO_{j-1} in true polarity
// and co is ~CO_j. With OAI = 1 (OAI stage, odd j) ci is ~CO_{j-1} and co is
// CO_j. The inverted RCA outputs fed to the OAI gate stand for the
// complemented carry and propagate a transistor-level cell would provide.
//
// Interface: a, b (W bits), ci; s (W bits), co.
// Timing: combinational. The RCA blocks of all stages settle in parallel;
// the path through the stage from ci is one skip gate to co and W half
// adders to s.
module cska_stage #(
  parameter int unsigned W   = 4,
  parameter bit          OAI = 1'b0
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         ci,
  output logic [W-1:0] s,
  output logic         co
);
  logic [W-1:0] s_rca;
  logic         c_rca;
  logic         p_grp;
  logic         ci_true;

  cska_rca #(.W(W)) u_rca (
    .a(a), .b(b), .cin(1'b0), .s(s_rca), .cout(c_rca), .p_grp(p_grp)
  );

  assign ci_true = OAI ? ~ci : ci;

  cska_inc #(.W(W)) u_inc (.x(s_rca), .cin(ci_true), .s(s));

  cska_skip #(.OAI(OAI)) u_skip (
    .c (OAI ? ~c_rca : c_rca),
    .p (OAI ? ~p_grp : p_grp),
    .ci(ci),
    .co(co)
  );
endmodule
