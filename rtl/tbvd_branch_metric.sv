// tbvd_branch_metric: branch metrics of one rate-1/2 symbol pair.
//
// For each of the four possible code labels c = {c0, c1} it gives the
// distance d[c] between the received soft-decision symbols and the ideal
// symbols of that label. A Q-bit symbol value 0 is a confident '0' and
// 2^Q-1 a confident '1'; the distance of a symbol r from an ideal bit b is
// r when b = 0 and 2^Q-1-r when b = 1, and d[c] is the sum over the two
// symbols. Smaller is more likely, as the add-compare-select keeps the
// smaller sum. The reference algorithm only names the table d[]; the soft
// decision format and the distance measure are this design's choice.
// Purely combinational.
module tbvd_branch_metric
  import tbvd_pkg::*;
#(
  parameter int unsigned Q = DEF_Q  // bits per soft-decision symbol
) (
  input  logic [Q-1:0] r0,       // received symbol 0 (from G0)
  input  logic [Q-1:0] r1,       // received symbol 1 (from G1)
  output logic [Q:0]   d [4]     // d[c], c = {symbol 0 bit, symbol 1 bit}
);

  localparam logic [Q-1:0] MAXQ = '1;

  function automatic logic [Q-1:0] sym_dist(logic [Q-1:0] r, logic b);
    return b ? (MAXQ - r) : r;
  endfunction

  always_comb begin
    for (int c = 0; c < 4; c++) begin
      d[c] = {1'b0, sym_dist(r0, c[1])} + {1'b0, sym_dist(r1, c[0])};
    end
  end

endmodule
