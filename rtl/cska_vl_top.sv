// cska_vl_top: hybrid variable latency carry skip adder.
//
// The datapath is the CI-CSKA (ci_cska) with its nucleus stage replaced by a
// Brent-Kung adder. The Brent-Kung nucleus shortens the paths through the
// middle of the adder, so every addition that does not sensitize one of the
// two long paths SLP1/SLP2 finishes within one short clock cycle, leaving
// slack that can be spent on a lower supply voltage. The predictor flags the
// rare operands that do sensitize a long path, and for those the controller
// stretches the operation to two clock cycles (adaptive clock stretching).
//
// Operation: an operand pair is taken when in_valid and in_ready are both
// high and is held in the operand registers. In the next cycle the adder
// evaluates; if the predictor is quiet the result is registered at the end
// of that cycle (latency 1). If it fires, the operand registers are held one
// more cycle and the result is registered at the end of the second cycle
// (latency 2); in_ready is low during that first cycle. out_valid pulses for
// one cycle with sum, cout and out_long (1 when the operation took two
// cycles). A new operand pair may be taken in the same cycle a result is
// registered, so throughput is one addition per cycle while no long path is
// sensitized.
//
// The handshake, the registers and the synchronous active-low reset are this
// design's choices; the source design describes the one/two-cycle behaviour.
module cska_vl_top
  import cska_pkg::*;
#(
  parameter int unsigned N       = N_BITS,
  parameter int unsigned Q       = Q_STAGES,
  parameter int unsigned SIZES [Q] = VSS_SIZES,
  parameter int unsigned NUCLEUS = NUCLEUS_STAGE,
  parameter int unsigned SLP1_LO = SLP1_FIRST,
  parameter int unsigned SLP1_HI = SLP1_LAST,
  parameter int unsigned SLP2_LO = SLP2_FIRST,
  parameter int unsigned SLP2_HI = SLP2_LAST
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic         out_valid,
  output logic [N-1:0] sum,
  output logic         cout,
  output logic         out_long
);
  logic [N-1:0] a_q, b_q;
  logic         cin_q;
  logic         busy;      // an operand pair is in the operand registers
  logic         stretched; // the current operation is in its second cycle
  logic [N-1:0] s_comb;
  logic         c_comb;
  logic         err, slp1, slp2;
  logic         finish, take;

  ci_cska #(.N(N), .Q(Q), .SIZES(SIZES), .NUCLEUS(NUCLEUS)) u_adder (
    .a(a_q), .b(b_q), .cin(cin_q), .s(s_comb), .cout(c_comb)
  );

  cska_predictor #(
    .N(N), .Q(Q), .SIZES(SIZES),
    .SLP1_LO(SLP1_LO), .SLP1_HI(SLP1_HI), .SLP2_LO(SLP2_LO), .SLP2_HI(SLP2_HI)
  ) u_pred (
    .a(a_q), .b(b_q), .err(err), .slp1(slp1), .slp2(slp2)
  );

  assign finish   = busy & (~err | stretched);
  assign in_ready = ~busy | finish;
  assign take     = in_valid & in_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      stretched <= 1'b0;
      out_valid <= 1'b0;
      a_q       <= '0;
      b_q       <= '0;
      cin_q     <= 1'b0;
      sum       <= '0;
      cout      <= 1'b0;
      out_long  <= 1'b0;
    end else begin
      out_valid <= finish;
      if (finish) begin
        sum      <= s_comb;
        cout     <= c_comb;
        out_long <= stretched;
      end
      if (take) begin
        a_q   <= a;
        b_q   <= b;
        cin_q <= cin;
      end
      busy      <= take | (busy & ~finish);
      stretched <= busy & ~finish;
    end
  end

  // The predictor only asks for a second cycle for one of the two paths.
  assert property (@(posedge clk) disable iff (!rst_n) err |-> (slp1 | slp2));
  // A stretched operation always finishes in its second cycle.
  assert property (@(posedge clk) disable iff (!rst_n) stretched |-> finish);
  // Operands stay put while an operation is in flight and not finishing.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (busy & ~finish) |=> ($stable(a_q) & $stable(b_q)));
endmodule
