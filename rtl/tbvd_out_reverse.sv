// tbvd_out_reverse: block order reversal of the decoded bits.
//
// The decoding unit delivers each block of L decoded bits last bit first. Two
// L-bit buffers alternate: during block b the bit decoded at step m is stored
// at position m of buffer (b mod 2), while the bit sent out at step m is
// position L-1-m of the other buffer, filled during block b-1. This is the
// reference algorithm's copy of out[] into outr[] at every block start,
// without the copy, and adds one block (L bit times) of delay.
//
// wr_en stores wr_bit at position m of buffer blk_par at the clock edge;
// out_bit is combinational and stable while m and blk_par are. Reset clears
// both buffers.
module tbvd_out_reverse
  import tbvd_pkg::*;
#(
  parameter int unsigned L = DEF_L  // bits per block
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [$clog2(L)-1:0] m,        // step in the block
  input  logic                 blk_par,  // block number mod 2
  input  logic                 wr_en,
  input  logic                 wr_bit,
  output logic                 out_bit   // bit L-1-m of the previous block
);

  localparam int unsigned MW = $clog2(L);

  logic [L-1:0] buf_q [2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buf_q[0] <= '0;
      buf_q[1] <= '0;
    end else if (wr_en) begin
      buf_q[blk_par][m] <= wr_bit;
    end
  end

  assign out_bit = buf_q[!blk_par][MW'(L - 1) - m];

endmodule
