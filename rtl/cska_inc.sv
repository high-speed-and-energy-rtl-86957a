// cska_inc: the incrementation block of one CI-CSKA stage.
//
// A chain of W half adders that adds the carry output of the previous stage
// to the sum produced by the stage's zero-carry RCA block, giving the final
// sum bits of the stage. The carry out of the chain is deliberately not
// produced: the stage carry comes from the skip logic instead, which keeps
// the incrementer off the carry path.
//
// Interface: x (W-bit partial sum), cin (true polarity); s (W-bit sum).
// Timing: combinational, W half-adder cells from cin to s[W-1].
module cska_inc #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] x,
  input  logic         cin,
  output logic [W-1:0] s
);
  // c[i] is the carry into bit i. The last cell needs no carry out, so it
  // is only the sum half of a half adder.
  logic [W-1:0] c;
  assign c[0] = cin;

  for (genvar i = 0; i + 1 < W; i++) begin : g_ha
    cska_ha u_ha (.a(x[i]), .b(c[i]), .s(s[i]), .co(c[i+1]));
  end
  assign s[W-1] = x[W-1] ^ c[W-1];
endmodule
