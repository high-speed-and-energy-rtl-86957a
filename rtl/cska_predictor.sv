// cska_predictor: predictor of the hybrid variable latency CSKA.
//
// A long carry path through the skip gates is only sensitized when every
// stage it crosses propagates, that is when a[i]^b[i] = 1 for all bits of
// those stages. The predictor watches the two long paths SLP1 (stages
// SLP1_FIRST..SLP1_LAST) and SLP2 (stages SLP2_FIRST..SLP2_LAST), which share
// the nucleus stage, and raises err when either is fully propagating. The
// controller then gives the addition a second clock cycle. err is
// conservative: it may fire when the carry in fact stops early, never the
// other way round.
//
// The source design names this block and the two paths; the exact stage
// ranges and the AND/OR form are this design's reading of it.
//
// Interface: a, b (N bits); err, slp1, slp2.
// Timing: combinational, an AND tree over at most N bits and one OR.
module cska_predictor
  import cska_pkg::*;
#(
  parameter int unsigned N          = N_BITS,
  parameter int unsigned Q          = Q_STAGES,
  parameter int unsigned SIZES [Q]  = VSS_SIZES,
  parameter int unsigned SLP1_LO    = SLP1_FIRST,
  parameter int unsigned SLP1_HI    = SLP1_LAST,
  parameter int unsigned SLP2_LO    = SLP2_FIRST,
  parameter int unsigned SLP2_HI    = SLP2_LAST
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic         err,
  output logic         slp1,
  output logic         slp2
);
  // Bit mask of the 1-based stages lo..hi.
  function automatic logic [N-1:0] stage_mask(int unsigned lo, int unsigned hi);
    logic [N-1:0] m = '0;
    int unsigned o = 0;
    for (int unsigned k = 0; k < Q; k++) begin
      for (int unsigned i = 0; i < SIZES[k]; i++) begin
        if (k + 1 >= lo && k + 1 <= hi) m[o + i] = 1'b1;
      end
      o += SIZES[k];
    end
    return m;
  endfunction

  localparam logic [N-1:0] MASK1 = stage_mask(SLP1_LO, SLP1_HI);
  localparam logic [N-1:0] MASK2 = stage_mask(SLP2_LO, SLP2_HI);

  logic [N-1:0] p;
  assign p    = a ^ b;
  assign slp1 = &(p | ~MASK1);
  assign slp2 = &(p | ~MASK2);
  assign err  = slp1 | slp2;
endmodule
