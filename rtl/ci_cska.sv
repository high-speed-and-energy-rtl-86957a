// ci_cska: N-bit concatenation-incrementation carry skip adder (CI-CSKA),
// optionally with its nucleus stage replaced by a Brent-Kung adder (the
// hybrid structure).
//
// The operands are cut into Q stages of SIZES[j] bits, stage 1 at the least
// significant end. Stage 1 is a plain ripple-carry block fed by the adder's
// carry input. Every later stage (cska_stage) has a zero-carry RCA block, an
// incrementation block and one compound skip gate; all RCA blocks settle in
// parallel and the carry then runs through one gate per stage. The skip
// gates alternate AOI (even stages, inverted carry out) and OAI (odd stages,
// true carry out), so the carry leaving an even stage is inverted; the adder
// carry output is inverted back when Q is even.
//
// NUCLEUS = p (1..Q) replaces stage p by cska_bk_ppa, which receives the
// stage carry in true polarity and hands its carry on in the polarity the
// chain expects at that point. NUCLEUS = 0 gives the plain CI-CSKA. Stage
// sizes with SIZES all equal give the fixed stage size (FSS) form, unequal
// sizes the variable stage size (VSS) form.
//
// Interface: a, b (N bits), cin; s (N bits), cout.
// Timing: combinational.
module ci_cska
  import cska_pkg::*;
#(
  parameter int unsigned N       = N_BITS,
  parameter int unsigned Q       = Q_STAGES,
  parameter int unsigned SIZES [Q] = VSS_SIZES,
  parameter int unsigned NUCLEUS = 0
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] s,
  output logic         cout
);
  function automatic int unsigned offset_of(int unsigned j);
    int unsigned o = 0;
    for (int unsigned k = 0; k < j; k++) o += SIZES[k];
    return o;
  endfunction

  initial begin : check_sizes
    assert (offset_of(Q) == N)
      else $error("ci_cska: stage sizes add up to %0d, not N = %0d", offset_of(Q), N);
    assert (NUCLEUS != 1)
      else $error("ci_cska: stage 1 cannot be the nucleus");
  end

  // co[k] is the carry leaving 0-based stage k; it is inverted when k is odd
  // (1-based stage k+1 even, AOI gate).
  logic [Q-1:0] co;

  for (genvar k = 0; k < Q; k++) begin : g_stage
    localparam int unsigned O = offset_of(k);
    localparam int unsigned W = SIZES[k];
    if (k == 0) begin : g_first
      logic p_unused;
      cska_rca #(.W(W)) u_rca (
        .a(a[O +: W]), .b(b[O +: W]), .cin(cin),
        .s(s[O +: W]), .cout(co[0]), .p_grp(p_unused)
      );
    end else if (k + 1 == NUCLEUS) begin : g_nucleus
      logic ci_true, co_true, p_unused;
      // The incoming carry is inverted when the previous stage is even.
      assign ci_true = (k % 2 == 1) ? co[k-1] : ~co[k-1];
      cska_bk_ppa #(.W(W)) u_ppa (
        .a(a[O +: W]), .b(b[O +: W]), .cin(ci_true),
        .s(s[O +: W]), .cout(co_true), .p_grp(p_unused)
      );
      assign co[k] = (k % 2 == 1) ? ~co_true : co_true;
    end else begin : g_cska
      cska_stage #(.W(W), .OAI(k % 2 == 0)) u_stage (
        .a(a[O +: W]), .b(b[O +: W]), .ci(co[k-1]),
        .s(s[O +: W]), .co(co[k])
      );
    end
  end

  assign cout = (Q % 2 == 0) ? ~co[Q-1] : co[Q-1];
endmodule
