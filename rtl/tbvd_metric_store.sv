// tbvd_metric_store: accumulated metrics and their exchange between
// processors.
//
// Holds two copies of the 2^(K-1) accumulated metrics, selected by the parity
// of the bit time: during bit time t the processors read the metrics of bit
// time t-1 from half (par ^ 1) and write the new ones into half par, as in
// the reference algorithm's M[state][bit_par]. Every processor has two read
// ports (the two predecessors of its current state) and one write port, so
// any processor can read the metric of any state: this shared register file
// stands in for the interconnection network through which the processors of
// the parallel decoder exchange metrics, whose own structure is described
// elsewhere and not reproduced here.
//
// Reads are combinational; writes take effect at the clock edge when we is
// high. Reset clears every metric, so decoding starts with all states equally
// likely (the starting metrics are this design's choice).
module tbvd_metric_store
  import tbvd_pkg::*;
#(
  parameter int unsigned NS    = 1 << (DEF_K - 1),  // number of states
  parameter int unsigned NPROC = DEF_NPROC,         // processors
  parameter int unsigned W     = DEF_W              // metric width
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  par,                 // half written this bit time
  input  logic [$clog2(NS)-1:0] rd_idx_up [NPROC],
  input  logic [$clog2(NS)-1:0] rd_idx_lo [NPROC],
  output logic [W-1:0]          rd_up     [NPROC],
  output logic [W-1:0]          rd_lo     [NPROC],
  input  logic                  we,
  input  logic [$clog2(NS)-1:0] wr_idx    [NPROC],
  input  logic [W-1:0]          wr_data   [NPROC]
);

  logic [W-1:0] mem [2][NS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int h = 0; h < 2; h++)
        for (int s = 0; s < NS; s++)
          mem[h][s] <= '0;
    end else if (we) begin
      for (int p = 0; p < NPROC; p++)
        mem[par][wr_idx[p]] <= wr_data[p];
    end
  end

  always_comb begin
    for (int p = 0; p < NPROC; p++) begin
      rd_up[p] = mem[!par][rd_idx_up[p]];
      rd_lo[p] = mem[!par][rd_idx_lo[p]];
    end
  end

endmodule
