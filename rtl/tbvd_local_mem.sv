// tbvd_local_mem: one processor's share of the traceback memory.
//
// A single-bit-wide RAM of DEPTH words with one write port (the processor
// storing its decisions) and one read port (the shared address bus). The
// read is synchronous: the bit addressed while rd_en is high appears on
// rd_bit after the clock edge and holds until the next read. The memory is
// not reset; like commercial RAM chips it powers up with unknown contents,
// which the decoder never uses for valid output.
module tbvd_local_mem #(
  parameter int unsigned DEPTH = 2400  // bits held
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic                     wbit,
  input  logic                     rd_en,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic                     rd_bit
);

  logic mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wbit;
  end

  always_ff @(posedge clk) begin
    if (rd_en) rd_bit <= mem[raddr];
  end

endmodule
