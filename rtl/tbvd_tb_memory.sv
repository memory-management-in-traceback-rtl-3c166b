// tbvd_tb_memory: the three-bank traceback memory with its address and data
// bus.
//
// Logically the memory is three banks, each L columns (branches) by 2^(K-1)
// rows (states); a cell holds the decision bit of one state at one branch.
// Physically it is split among the NPROC processors: processor p owns the
// S = 2^(K-1)/NPROC consecutive states p*S .. p*S+S-1 and keeps their rows of
// all three banks in its own local memory, so all processors write a full
// column of the decoding bank concurrently, S states at a time. The
// traceback and decoding units share one address bus, broadcast to every
// local memory as (bank, column, state); the data bus returns the bit of the
// memory that owns the state.
//
// Write: when we is high, processor p writes wr_bits[p] to row wr_row of
// bank wr_bank, column wr_m. Read: the cell addressed while rd_en is high
// appears on rd_bit one cycle later. Inside a local memory the cell of row r,
// bank b and column m is at word (b*L + m)*S + r. The split into local
// memories follows the parallel architecture; the word layout and the
// one-cycle read are this design's choices.
module tbvd_tb_memory
  import tbvd_pkg::*;
#(
  parameter int unsigned K     = DEF_K,      // constraint length
  parameter int unsigned L     = DEF_L,      // columns per bank
  parameter int unsigned NPROC = DEF_NPROC   // processors / local memories
) (
  input  logic                               clk,
  input  logic                               rst_n,
  // write side (all processors)
  input  logic                               we,
  input  bank_t                              wr_bank,
  input  logic [$clog2(L)-1:0]               wr_m,
  input  logic [idx_w((1 << (K - 1)) / NPROC)-1:0] wr_row,
  input  logic [NPROC-1:0]                   wr_bits,
  // address bus
  input  logic                               rd_en,
  input  bank_t                              rd_bank,
  input  logic [$clog2(L)-1:0]               rd_m,
  input  logic [K-2:0]                       rd_state,
  // data bus
  output logic                               rd_bit
);

  localparam int unsigned NS    = 1 << (K - 1);
  localparam int unsigned SROWS = NS / NPROC;
  localparam int unsigned SW    = idx_w(SROWS);
  localparam int unsigned DEPTH = 3 * L * SROWS;
  localparam int unsigned AW    = $clog2(DEPTH);
  localparam int unsigned PW    = idx_w(NPROC);

  logic [AW-1:0]    waddr, raddr;
  logic [NPROC-1:0] lm_bit;
  logic [PW-1:0]    owner, owner_q;
  logic [SW-1:0]    rd_row;

  always_comb begin
    waddr = AW'((int'(wr_bank) * L + int'(wr_m)) * SROWS + int'(wr_row));
    owner = PW'(int'(rd_state) / SROWS);
    rd_row = SW'(int'(rd_state) % SROWS);
    raddr = AW'((int'(rd_bank) * L + int'(rd_m)) * SROWS + int'(rd_row));
  end

  for (genvar p = 0; p < NPROC; p++) begin : g_lm
    tbvd_local_mem #(.DEPTH(DEPTH)) u_lm (
      .clk    (clk),
      .we     (we),
      .waddr  (waddr),
      .wbit   (wr_bits[p]),
      .rd_en  (rd_en),
      .raddr  (raddr),
      .rd_bit (lm_bit[p])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     owner_q <= '0;
    else if (rd_en) owner_q <= owner;
  end

  assign rd_bit = lm_bit[owner_q];

  initial begin
    if (NS % NPROC != 0 || (NPROC & (NPROC - 1)) != 0)
      $error("tbvd_tb_memory: NPROC must be a power of two not above 2^(K-1)");
  end

endmodule
