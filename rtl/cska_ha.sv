// cska_ha: one-bit half adder, the cell of the incrementation blocks.
// Purely combinational: s = a ^ b, co = a & b.
module cska_ha (
  input  logic a,
  input  logic b,
  output logic s,
  output logic co
);
  always_comb begin
    s  = a ^ b;
    co = a & b;
  end
endmodule
