// tbvd_traceback_unit: the traceback pointer.
//
// At the start of every block (start high) the pointer is set to state 0.
// Each bit time it puts its state on the address bus (addr) and, when the
// data bus returns the stored decision (cap high), steps back one branch:
// the next state is the present state shifted right by one bit with the
// decision as the new top bit. After L bit times it has walked through one
// whole bank, and its state is the starting state for the decoding unit in
// the next block. This is the ADDRESS / BIT / NEW ADDRESS path of the
// traceback unit in the parallel architecture. start and cap are single-cycle
// strobes; the state changes at the clock edge.
module tbvd_traceback_unit
  import tbvd_pkg::*;
#(
  parameter int unsigned K = DEF_K  // constraint length
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,    // begin a new traceback front at state 0
  input  logic         cap,      // data bus holds the decision for addr
  input  logic         bit_in,   // data bus
  output logic [K-2:0] addr      // present state, driven on the address bus
);

  logic [K-2:0] state_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     state_q <= '0;
    else if (start) state_q <= '0;
    else if (cap)   state_q <= {bit_in, state_q[K-2:1]};
  end

  assign addr = state_q;

endmodule
