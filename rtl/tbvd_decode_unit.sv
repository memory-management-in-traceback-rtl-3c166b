// tbvd_decode_unit: the decoding pointer and its output bit.
//
// At the start of every block (start high) the pointer takes the state in
// which the traceback unit ended (init_state). Each bit time it puts its
// state on the address bus and, when the data bus returns the stored
// decision (cap high), steps back one branch exactly as the traceback unit
// does and produces the decoded bit: the top bit of the new state, which is
// the decision just read and equals the information bit that entered the
// encoder K-1 branches before that column. The decoded bits of a block come
// out last bit first and go to the output reversal buffer. out_bit is
// registered and valid in the cycle after cap (out_valid high for one
// cycle). Before the first start the pointer starts from state 0, an
// arbitrary choice.
module tbvd_decode_unit
  import tbvd_pkg::*;
#(
  parameter int unsigned K = DEF_K  // constraint length
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,       // begin a new decode front
  input  logic [K-2:0] init_state,  // last state found by the traceback unit
  input  logic         cap,         // data bus holds the decision for addr
  input  logic         bit_in,      // data bus
  output logic [K-2:0] addr,        // present state, driven on the address bus
  output logic         out_valid,
  output logic         out_bit
);

  logic [K-2:0] state_q, state_nx;

  assign state_nx = {bit_in, state_q[K-2:1]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= '0;
      out_valid <= 1'b0;
      out_bit   <= 1'b0;
    end else begin
      out_valid <= cap && !start;
      if (start) begin
        state_q <= init_state;
      end else if (cap) begin
        state_q <= state_nx;
        out_bit <= state_nx[K-2];
      end
    end
  end

  assign addr = state_q;

endmodule
