// cska_pkg: shared constants of the concatenation-incrementation carry skip
// adder (CI-CSKA) and of its hybrid variable latency extension.
//
// The default adder is 32 bits wide and built from eight stages of variable
// stage size (VSS): small stages at both ends and the largest stage, the
// nucleus, in the middle. The width, the stage count and the stage sizes are
// this design's own choice; the source design only fixes the structure
// (N-bit operands, Q stages, the nucleus being the largest middle stage).
// Stages are numbered from 1 in the comments, as in the usual description of
// the adder, and from 0 in the arrays.
package cska_pkg;

  // Operand width N.
  parameter int unsigned N_BITS   = 32;
  // Number of stages Q.
  parameter int unsigned Q_STAGES = 8;
  // Variable stage sizes, stage 1 first; they add up to N_BITS.
  parameter int unsigned VSS_SIZES [Q_STAGES] = '{2, 3, 4, 5, 8, 5, 3, 2};
  // Fixed stage sizes (FSS) alternative: eight stages of four bits.
  parameter int unsigned FSS_SIZES [Q_STAGES] = '{4, 4, 4, 4, 4, 4, 4, 4};
  // Stage (1-based) replaced by the Brent-Kung adder in the hybrid adder.
  parameter int unsigned NUCLEUS_STAGE = 5;
  // Long paths watched by the predictor, as inclusive ranges of stages.
  // SLP1 runs from stage 2 up to the nucleus, SLP2 from the nucleus up to
  // the stage before the last; the nucleus belongs to both.
  parameter int unsigned SLP1_FIRST = 2;
  parameter int unsigned SLP1_LAST  = NUCLEUS_STAGE;
  parameter int unsigned SLP2_FIRST = NUCLEUS_STAGE;
  parameter int unsigned SLP2_LAST  = Q_STAGES - 1;

endpackage
