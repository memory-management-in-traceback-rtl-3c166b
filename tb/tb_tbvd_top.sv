// tb_tbvd_top: end-to-end test of the traceback decoder at its default size
// (K = 7, L = 100, 8 processors).
//
// Random information bits are encoded, sent through a channel that is clean
// except for a noisy stretch, and fed to the decoder with random pauses. Each
// decoded bit is compared with (a) the bit-exact software model of the
// algorithm, from bit time 4L on, when every bank read holds written data, and
// (b) the information bit of bit time t-(4L+K-1), outside a margin around the
// noisy stretch. The testbench also checks that back-to-back bit times take
// S+3 cycles, and counts how often each mechanism happened: each of the six
// (traceback bank, direction) block types, input stalls, a non-zero start
// state handed from traceback to decoding, and corrected channel errors.
module tb_tbvd_top;
  import tbvd_pkg::*;
  import tbvd_ref_pkg::*;

  localparam int K = DEF_K, L = DEF_L, NPROC = DEF_NPROC, Q = DEF_Q;
  localparam int S = (1 << (K - 1)) / NPROC;
  localparam int T = S + 3;
  localparam int D = 4 * L + K - 1;
  localparam int NBITS = 14 * L;
  localparam int NOISE_LO = 6 * L, NOISE_HI = 9 * L;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready;
  logic [Q-1:0] in_r0 = '0, in_r1 = '0;
  logic out_valid, out_bit, blk_start, blk_par;
  bank_t bank_tb, bank_dec;

  tbvd_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  bit info [NBITS];
  bit refq [NBITS];
  int nout = 0, cyc = 0, last_acc = -1, stalls = 0, chan_err = 0, bit_err = 0;
  int blk_type [6];
  bit prev_stalled = 0;

  tbvd_ref #(K, L, Q) refm;
  tbvd_encoder #(K) enc;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  always @(posedge clk) cyc++;

  // Output monitor and mechanism counters.
  always @(negedge clk) begin
    if (rst_n) begin
      if (blk_start) blk_type[int'(bank_tb) * 2 + int'(blk_par)]++;
      if (in_valid && in_ready) begin
        if (last_acc >= 0 && !prev_stalled)
          check(cyc - last_acc == T, $sformatf("bit time %0d cycles", cyc - last_acc));
        last_acc = cyc;
      end
      if (out_valid) begin
        if (nout >= 4 * L)
          check(out_bit == refq[nout], $sformatf("model mismatch at bit time %0d", nout));
        if (nout >= D) begin
          int n;
          n = nout - D;
          if (out_bit != info[n]) bit_err++;
          if (n < NOISE_LO - L || n >= NOISE_HI + 2 * L)
            check(out_bit == info[n], $sformatf("decoded bit %0d wrong", n));
        end
        nout++;
      end
    end
  end

  initial begin
    int c, s0, s1;
    refm = new();
    enc  = new();
    foreach (blk_type[i]) blk_type[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < NBITS; n++) begin
      info[n] = 1'($urandom_range(1));
      c  = enc.encode(info[n]);
      s0 = channel(c[1], Q, (n >= NOISE_LO && n < NOISE_HI) ? 6 : 0);
      s1 = channel(c[0], Q, (n >= NOISE_LO && n < NOISE_HI) ? 6 : 0);
      if ((s0 >= 4) != c[1]) chan_err++;
      if ((s1 >= 4) != c[0]) chan_err++;
      refq[n] = refm.step(s0, s1);
      prev_stalled = 0;
      if ($urandom_range(15) == 0) begin
        in_valid = 0;
        repeat ($urandom_range(1, 4)) @(negedge clk);
        stalls++;
        prev_stalled = 1;
      end
      in_valid = 1;
      in_r0 = Q'(s0);
      in_r1 = Q'(s1);
      while (!in_ready) @(negedge clk);
      @(negedge clk);
    end
    in_valid = 0;
    repeat (3 * T) @(negedge clk);
    check(nout == NBITS, $sformatf("%0d outputs for %0d inputs", nout, NBITS));
    foreach (blk_type[i]) begin
      check(blk_type[i] > 0, $sformatf("block type bank %0d dir %0d never seen", i / 2, i % 2));
    end
    check(stalls > 0, "no input stall");
    check(refm.handoffs_nonzero > 0, "no non-zero decode start state");
    check(chan_err > 0, "no channel errors");
    check(bit_err * 10 < chan_err, $sformatf("%0d decoded errors for %0d channel errors", bit_err, chan_err));
    $display("mechanisms: block types %0d %0d %0d %0d %0d %0d, stalls %0d, nonzero hand-overs %0d, channel errors %0d, decoded errors %0d",
             blk_type[0], blk_type[1], blk_type[2], blk_type[3], blk_type[4], blk_type[5],
             stalls, refm.handoffs_nonzero, chan_err, bit_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NBITS * (T + 4) + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
