// tbvd_bank_ctrl: memory bank and pointer sequencer of the traceback decoder.
//
// It keeps the bit memory pointer m (time mod L), the block parity and the
// number of the bank doing traceback; the decoding (and writing) bank is the
// next one in the cycle 0 -> 1 -> 2. Every L bit times the traceback bank
// advances and the sweep direction flips: in even blocks the column pointer
// m1 runs right to left (m1 = L-1-m), in odd blocks left to right (m1 = m).
// Together these repeat every six blocks. The parity of the bit time selects
// the half of the ping-pong metric store that is written. This follows the
// reference algorithm; the bit-time phase schedule is this design's own.
//
// Interface: one received symbol pair is taken per bit time with a
// valid/ready handshake (in_valid & in_ready). A bit time lasts T = S+3
// cycles, S being the number of add-compare-select steps per bit time:
// phase 0 loads the start states at a block start, phase 1 reads for the
// decoding unit, phase 2 reads for the traceback unit, phases 3..S+2 are the
// add-compare-select steps. in_ready is high when idle and in the last phase,
// so back-to-back bit times cost exactly T cycles; without input the
// controller waits idle (a stall). The pointer outputs are stable for the
// whole bit time and advance after its last phase.
module tbvd_bank_ctrl
  import tbvd_pkg::*;
#(
  parameter int unsigned L = DEF_L,  // branches per bank
  parameter int unsigned S = (1 << (DEF_K - 1)) / DEF_NPROC  // ACS steps per bit time
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         in_valid,
  output logic                         in_ready,
  output logic                         busy,       // a bit time is in progress
  output strobes_t                     strb,
  output logic [idx_w(S)-1:0]          acs_step, // ACS step during acs_en
  output logic [$clog2(L)-1:0]         m,          // time mod L
  output logic [$clog2(L)-1:0]         m1,         // column in the bank
  output logic                         blk_start,  // this bit time has m == 0
  output logic                         blk_par,    // block number mod 2
  output logic                         bit_par,    // bit time mod 2
  output bank_t                        bank_tb,    // bank doing traceback
  output bank_t                        bank_dec    // bank doing decoding and writing
);

  localparam int unsigned T   = S + 3;
  localparam int unsigned PHW = $clog2(T);
  localparam int unsigned MW  = $clog2(L);
  localparam int unsigned SW  = idx_w(S);

  logic [PHW-1:0] ph;
  logic           accept;
  logic           last;

  assign last     = busy && (ph == PHW'(T - 1));
  assign in_ready = !busy || last;
  assign accept   = in_valid && in_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      ph   <= '0;
    end else if (accept) begin
      busy <= 1'b1;
      ph   <= '0;
    end else if (last) begin
      busy <= 1'b0;
      ph   <= '0;
    end else if (busy) begin
      ph <= ph + PHW'(1);
    end
  end

  // Pointers advance once the bit time is over.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m       <= '0;
      blk_par <= 1'b0;
      bit_par <= 1'b0;
      bank_tb <= 2'd0;
    end else if (last) begin
      bit_par <= !bit_par;
      if (m == MW'(L - 1)) begin
        m       <= '0;
        blk_par <= !blk_par;
        bank_tb <= bank_after(bank_tb);
      end else begin
        m <= m + MW'(1);
      end
    end
  end

  assign bank_dec  = bank_after(bank_tb);
  assign m1        = blk_par ? m : MW'(L - 1) - m;
  assign blk_start = (m == '0);

  always_comb begin
    strb          = '0;
    strb.load     = busy && (ph == PHW'(0));
    strb.dec_rd   = busy && (ph == PHW'(1));
    strb.tb_rd    = busy && (ph == PHW'(2));
    strb.dec_cap  = busy && (ph == PHW'(2));
    strb.tb_cap   = busy && (ph == PHW'(3));
    strb.acs_en   = busy && (ph >= PHW'(3));
    strb.bit_done = last;
  end

  assign acs_step = SW'(ph - PHW'(3));

  initial begin
    if (L < 2) $error("tbvd_bank_ctrl: L must be at least 2");
    if (S < 1) $error("tbvd_bank_ctrl: S must be at least 1");
  end

endmodule
