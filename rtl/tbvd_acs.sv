// tbvd_acs: add-compare-select for one trellis state.
//
// State j (K-1 bits) has the two predecessors i = j >> 1 and i | 2^(K-2).
// The branch from i carries the code label c of the encoder window j (oldest
// bit 0); the branch from i | 2^(K-2) carries the complementary label 3-c,
// which holds because both generators tap the newest and the oldest window
// bit (checked at elaboration). The module forms L0 = M[i] + d[c] and
// L1 = M[i | 2^(K-2)] + d[3-c], keeps the smaller and reports decision 1 when
// L1 < L0, 0 otherwise (a tie keeps L0), exactly as the reference algorithm.
// The decision bit is the oldest bit of the surviving predecessor and is what
// the traceback memory stores.
//
// Metrics are W-bit values that wrap around: the comparison takes the sign of
// the W-bit difference, which is exact while the spread of all metrics stays
// below 2^(W-1), so no metric normalisation is needed. The wrap-around
// arithmetic is this design's choice; the algorithm uses unbounded sums.
// Purely combinational; one processor runs one state per cycle.
module tbvd_acs
  import tbvd_pkg::*;
#(
  parameter int unsigned K  = DEF_K,   // constraint length
  parameter int unsigned Q  = DEF_Q,   // soft-decision bits (branch metric is Q+1 bits)
  parameter int unsigned W  = DEF_W,   // accumulated metric width
  parameter int unsigned G0 = DEF_G0,  // generator of code symbol 0
  parameter int unsigned G1 = DEF_G1   // generator of code symbol 1
) (
  input  logic [K-2:0] state,        // j
  input  logic [W-1:0] m_up,         // M[j >> 1]
  input  logic [W-1:0] m_lo,         // M[(j >> 1) | 2^(K-2)]
  input  logic [Q:0]   d [4],        // branch metrics
  output logic [W-1:0] m_new,        // surviving metric
  output logic         decision      // 1: predecessor (j >> 1) | 2^(K-2) survived
);

  logic [1:0]   c;
  logic [W-1:0] l0, l1, diff;

  always_comb begin
    c        = branch_label(int'(state), G0, G1);
    l0       = m_up + W'(d[c]);
    l1       = m_lo + W'(d[2'd3 - c]);
    diff     = l1 - l0;
    decision = diff[W-1];
    m_new    = decision ? l1 : l0;
  end

  initial begin
    if (((G0 >> (K - 1)) & 1) == 0 || ((G1 >> (K - 1)) & 1) == 0 ||
        (G0 & 1) == 0 || (G1 & 1) == 0)
      $error("tbvd_acs: both generators must tap the newest and the oldest bit");
  end

endmodule
