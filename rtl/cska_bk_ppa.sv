// cska_bk_ppa: the modified Brent-Kung parallel prefix adder that replaces
// the nucleus (largest, middle) stage in the hybrid variable latency CSKA.
//
// The carry input is folded into the prefix tree as an extra generate at
// position 0 (generate = cin, propagate = 0); operand bit i sits at position
// i+1. The tree is the Brent-Kung one: an up-sweep forms group generate and
// propagate over spans of 2, 4, 8, ... positions, so the carry out of the
// whole block (the longest carry) is ready after log2 levels on forward
// paths; a down-sweep then fills in the intermediate carries on backward
// paths. The width is padded up to the next power of two internally with
// positions that neither generate nor propagate. Sum bit i is
// (a[i]^b[i]) ^ G[0..i]. The block also returns its group propagate (AND of
// a[i]^b[i]), so it can take the place of a CI-CSKA stage.
//
// The folding of cin into the tree and the padding are this design's
// choices; the prefix network is the Brent-Kung one.
//
// Interface: a, b (W bits), cin (true polarity); s (W bits), cout, p_grp.
// Timing: combinational, about 2*log2(W+1) prefix levels.
module cska_bk_ppa #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout,
  output logic         p_grp
);
  localparam int unsigned LOG = $clog2(W + 1);
  localparam int unsigned L   = 1 << LOG;

  logic [W-1:0] p_bit;
  logic [L-1:0] g0, p0;   // position-level generate / propagate
  logic [L-1:0] gg;       // prefix generate G[0..k] after the tree

  assign p_bit = a ^ b;

  always_comb begin
    g0 = '0;
    p0 = '0;
    g0[0] = cin;
    for (int unsigned i = 0; i < W; i++) begin
      g0[i+1] = a[i] & b[i];
      p0[i+1] = p_bit[i];
    end
  end

  always_comb begin
    logic [L-1:0] g, p;
    g = g0;
    p = p0;
    // Up-sweep: position k collects the span ending at k of length 2^(d+1).
    for (int unsigned d = 0; d < LOG; d++) begin
      for (int unsigned k = 0; k < L; k++) begin
        if (((k + 1) % (1 << (d + 1))) == 0) begin
          g[k] = g[k] | (p[k] & g[k - (1 << d)]);
          p[k] = p[k] & p[k - (1 << d)];
        end
      end
    end
    // Down-sweep: fill in the positions left between the up-sweep nodes.
    for (int d = int'(LOG) - 2; d >= 0; d--) begin
      for (int unsigned k = 0; k < L; k++) begin
        if (((k + 1) % (1 << (d + 1))) == (1 << d) && k >= (1 << (d + 1))) begin
          g[k] = g[k] | (p[k] & g[k - (1 << d)]);
          p[k] = p[k] & p[k - (1 << d)];
        end
      end
    end
    gg = g;
  end

  assign s     = p_bit ^ gg[W-1:0];
  assign cout  = gg[W];
  assign p_grp = &p_bit;
endmodule
