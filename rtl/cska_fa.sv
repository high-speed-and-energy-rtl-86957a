// cska_fa: one-bit full adder, the cell of the ripple-carry blocks.
// Purely combinational: s = a ^ b ^ ci, co = majority(a, b, ci).
module cska_fa (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  always_comb begin
    s  = a ^ b ^ ci;
    co = (a & b) | (ci & (a ^ b));
  end
endmodule
