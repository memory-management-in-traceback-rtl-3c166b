// tbvd_pkg: shared constants, types and functions of the traceback Viterbi
// decoder.
//
// The decoder stores the add-compare-select decisions in three memory banks
// and recovers the information bits with two read pointers (traceback and
// decoding) that move over the banks in alternating directions. The default
// code is the constraint length 7, rate 1/2 code with a truncation length
// L of 100 branches, the configuration of the reference algorithm this design
// follows. The generator polynomials (171, 133 octal, the common NASA K=7
// pair) and the soft-decision and metric widths are this design's choices.
//
// Encoder convention used everywhere: the K-bit encoder window holds the
// newest information bit in bit 0 and the oldest in bit K-1; the decoder
// state is the low K-1 bits of the window. A generator bit n taps window bit
// n. Code symbol 0 (from G0) is label bit 1, code symbol 1 (from G1) is label
// bit 0.
package tbvd_pkg;

  localparam int unsigned DEF_K     = 7;     // constraint length
  localparam int unsigned DEF_L     = 100;   // truncation length (branches per bank)
  localparam int unsigned DEF_NPROC = 8;     // add-compare-select processors
  localparam int unsigned DEF_Q     = 3;     // bits per soft-decision symbol
  localparam int unsigned DEF_W     = 16;    // accumulated metric width (modulo)
  localparam int unsigned DEF_G0    = 'o171; // generator of code symbol 0
  localparam int unsigned DEF_G1    = 'o133; // generator of code symbol 1

  // Number of the memory bank (0, 1 or 2).
  typedef logic [1:0] bank_t;

  // Single-cycle strobes issued by the bank controller during one bit time.
  typedef struct packed {
    logic load;     // phase 0: start-of-block hand-over of the start states
    logic dec_rd;   // phase 1: decoding unit drives the address bus
    logic tb_rd;    // phase 2: traceback unit drives the address bus
    logic dec_cap;  // phase 2: data bus holds the decoding unit's bit
    logic tb_cap;   // phase 3: data bus holds the traceback unit's bit
    logic acs_en;   // phases 3..S+2: one add-compare-select step
    logic bit_done; // last phase of the bit time
  } strobes_t;

  // Two-bit code label of an encoder window: {symbol from G0, symbol from G1}.
  function automatic logic [1:0] branch_label(int unsigned win, int unsigned g0,
                                              int unsigned g1);
    return {^(win & g0), ^(win & g1)};
  endfunction

  // Width of an index into n items, at least one bit.
  function automatic int unsigned idx_w(int unsigned n);
    return (n > 1) ? $clog2(n) : 1;
  endfunction

  // Bank that follows b in the cycle 0 -> 1 -> 2 -> 0.
  function automatic bank_t bank_after(bank_t b);
    return (b == 2'd2) ? 2'd0 : b + 2'd1;
  endfunction

endpackage
