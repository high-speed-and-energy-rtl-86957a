// cska_rca: the ripple-carry (RCA) block of one CI-CSKA stage.
//
// A chain of W full adders. In every stage except the first the carry input
// is tied to zero by the instantiating stage (the concatenation idea), so all
// RCA blocks of the adder work in parallel instead of waiting for each other.
// Besides the W-bit sum and its carry output C_j, the block returns the
// group propagate P_j, the AND of the bitwise propagate signals a[i]^b[i]
// ("the product of the intermediate results"), which the skip logic uses.
//
// Interface: a, b (W bits), cin; s (W bits), cout, p_grp.
// Timing: combinational; the worst path is cin/a[0] to cout through W cells.
module cska_rca #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout,
  output logic         p_grp
);
  logic [W:0] c;
  assign c[0] = cin;

  for (genvar i = 0; i < W; i++) begin : g_fa
    cska_fa u_fa (.a(a[i]), .b(b[i]), .ci(c[i]), .s(s[i]), .co(c[i+1]));
  end

  assign cout  = c[W];
  assign p_grp = &(a ^ b);
endmodule
