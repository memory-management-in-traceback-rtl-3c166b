// tbvd_top: traceback Viterbi decoder with three-bank memory management.
//
// A rate-1/2 convolutional code of constraint length K is decoded by storing,
// for every state and branch, the one-bit decision of the add-compare-select
// (which of the two paths into the state survived) and by walking back
// through these decisions instead of keeping whole survivor sequences. The
// decision memory is three banks of L branches each. In every block of L bit
// times one bank is traced back from state 0 (traceback unit), a second bank,
// holding older data, is walked from the state where the previous traceback
// ended (decoding unit) and yields the decoded bits, and each column the
// decoding unit has just read is rewritten with the new decisions of that bit
// time. The third bank waits. Banks rotate and the sweep direction flips
// every block, a pattern that repeats every six blocks. The decoded bits of a
// block come out in reverse order and are put right by a one-block reversal
// buffer.
//
// The add-compare-select work is shared by NPROC processors, each running
// S = 2^(K-1)/NPROC states one after another and writing its decisions into
// its own local part of the memory; metrics are exchanged through a shared
// metric store. The traceback and decoding units reach all local memories
// over one address bus and one data bus.
//
// Interface: one received symbol pair (two Q-bit soft decisions, 0 = sure
// '0', 2^Q-1 = sure '1') per bit time, taken when in_valid and in_ready are
// both high. A bit time takes S+3 clock cycles; the input may pause at any
// bit time boundary. Every bit time ends with out_valid high for one cycle
// and a decoded bit on out_bit. The decoded bit of bit time t is the
// information bit of bit time t - (4L+K-1): three blocks for the memory, one
// for the reversal and K-1 branches of encoder memory. The first 4L+K-1
// outputs carry no information. blk_start pulses when a block starts; the
// bank numbers and block parity show the memory schedule.
//
// The bank schedule, pointer arithmetic, add-compare-select and output
// reversal follow the reference algorithm; the generators, the soft-decision
// metric, the metric width, the processor count and the cycle schedule are
// this design's choices.
module tbvd_top
  import tbvd_pkg::*;
#(
  parameter int unsigned K     = DEF_K,      // constraint length
  parameter int unsigned L     = DEF_L,      // truncation length, branches per bank
  parameter int unsigned NPROC = DEF_NPROC,  // add-compare-select processors
  parameter int unsigned Q     = DEF_Q,      // soft-decision bits per symbol
  parameter int unsigned W     = DEF_W,      // accumulated metric width
  parameter int unsigned G0    = DEF_G0,     // generator of code symbol 0
  parameter int unsigned G1    = DEF_G1      // generator of code symbol 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [Q-1:0] in_r0,      // received symbol 0
  input  logic [Q-1:0] in_r1,      // received symbol 1
  output logic         out_valid,  // one pulse per bit time
  output logic         out_bit,    // decoded bit
  output logic         blk_start,  // pulse: a new traceback front starts
  output logic         blk_par,    // block parity: 0 right to left, 1 left to right
  output bank_t        bank_tb,    // bank doing traceback
  output bank_t        bank_dec    // bank doing decoding and writing
);

  localparam int unsigned NS  = 1 << (K - 1);
  localparam int unsigned NS2 = NS / 2;
  localparam int unsigned S   = NS / NPROC;
  localparam int unsigned SW  = idx_w(S);
  localparam int unsigned NSW = K - 1;
  localparam int unsigned MW  = $clog2(L);

  // ---------------------------------------------------------------- control
  strobes_t       strb;
  logic           bit_par, first_bit;
  logic [SW-1:0]  acs_step;
  logic [MW-1:0]  m, m1;

  tbvd_bank_ctrl #(.L(L), .S(S)) u_ctrl (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (in_valid),
    .in_ready  (in_ready),
    .busy      (),
    .strb      (strb),
    .acs_step  (acs_step),
    .m         (m),
    .m1        (m1),
    .blk_start (first_bit),
    .blk_par   (blk_par),
    .bit_par   (bit_par),
    .bank_tb   (bank_tb),
    .bank_dec  (bank_dec)
  );

  logic load_start;
  assign load_start = strb.load && first_bit;
  assign blk_start  = load_start;

  // ------------------------------------------------------- branch metrics
  logic [Q-1:0] r0_q, r1_q;
  logic [Q:0]   d [4];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r0_q <= '0;
      r1_q <= '0;
    end else if (in_valid && in_ready) begin
      r0_q <= in_r0;
      r1_q <= in_r1;
    end
  end

  tbvd_branch_metric #(.Q(Q)) u_bm (.r0(r0_q), .r1(r1_q), .d(d));

  // ------------------------------------------- add-compare-select processors
  logic [NSW-1:0] st      [NPROC];
  logic [NSW-1:0] idx_up  [NPROC];
  logic [NSW-1:0] idx_lo  [NPROC];
  logic [W-1:0]   m_up    [NPROC];
  logic [W-1:0]   m_lo    [NPROC];
  logic [W-1:0]   m_new   [NPROC];
  logic [NPROC-1:0] dec_bits;

  for (genvar p = 0; p < NPROC; p++) begin : g_proc
    assign st[p]     = NSW'(p * S) + NSW'(acs_step);
    assign idx_up[p] = st[p] >> 1;
    assign idx_lo[p] = (st[p] >> 1) | NSW'(NS2);

    tbvd_acs #(.K(K), .Q(Q), .W(W), .G0(G0), .G1(G1)) u_acs (
      .state    (st[p]),
      .m_up     (m_up[p]),
      .m_lo     (m_lo[p]),
      .d        (d),
      .m_new    (m_new[p]),
      .decision (dec_bits[p])
    );
  end

  tbvd_metric_store #(.NS(NS), .NPROC(NPROC), .W(W)) u_metrics (
    .clk       (clk),
    .rst_n     (rst_n),
    .par       (bit_par),
    .rd_idx_up (idx_up),
    .rd_idx_lo (idx_lo),
    .rd_up     (m_up),
    .rd_lo     (m_lo),
    .we        (strb.acs_en),
    .wr_idx    (st),
    .wr_data   (m_new)
  );

  // ------------------------------------------------ traceback memory + bus
  logic           bus_en, bus_bit;
  bank_t          bus_bank;
  logic [NSW-1:0] bus_state, tb_addr, dec_addr;

  always_comb begin
    bus_en    = strb.dec_rd || strb.tb_rd;
    bus_bank  = strb.dec_rd ? bank_dec : bank_tb;
    bus_state = strb.dec_rd ? dec_addr : tb_addr;
  end

  tbvd_tb_memory #(.K(K), .L(L), .NPROC(NPROC)) u_mem (
    .clk      (clk),
    .rst_n    (rst_n),
    .we       (strb.acs_en),
    .wr_bank  (bank_dec),
    .wr_m     (m1),
    .wr_row   (acs_step),
    .wr_bits  (dec_bits),
    .rd_en    (bus_en),
    .rd_bank  (bus_bank),
    .rd_m     (m1),
    .rd_state (bus_state),
    .rd_bit   (bus_bit)
  );

  // --------------------------------------------- traceback and decoding
  logic dec_valid, dec_bit;

  tbvd_traceback_unit #(.K(K)) u_tb (
    .clk    (clk),
    .rst_n  (rst_n),
    .start  (load_start),
    .cap    (strb.tb_cap),
    .bit_in (bus_bit),
    .addr   (tb_addr)
  );

  tbvd_decode_unit #(.K(K)) u_dec (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (load_start),
    .init_state (tb_addr),
    .cap        (strb.dec_cap),
    .bit_in     (bus_bit),
    .addr       (dec_addr),
    .out_valid  (dec_valid),
    .out_bit    (dec_bit)
  );

  // ------------------------------------------------------ output reversal
  logic rev_bit;

  tbvd_out_reverse #(.L(L)) u_rev (
    .clk     (clk),
    .rst_n   (rst_n),
    .m       (m),
    .blk_par (blk_par),
    .wr_en   (dec_valid),
    .wr_bit  (dec_bit),
    .out_bit (rev_bit)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_bit   <= 1'b0;
    end else begin
      out_valid <= strb.bit_done;
      if (strb.bit_done) out_bit <= rev_bit;
    end
  end

  // The traceback bank is never written while it is being traced.
  assert property (@(posedge clk) disable iff (!rst_n) bank_tb != bank_dec);
  // The bus is used by one unit at a time.
  assert property (@(posedge clk) disable iff (!rst_n) !(strb.dec_rd && strb.tb_rd));

  initial begin
    if (NPROC < 1 || NS % NPROC != 0)
      $error("tbvd_top: NPROC must divide 2^(K-1)");
  end

endmodule
