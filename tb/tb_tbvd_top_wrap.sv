// tb_tbvd_top_wrap: end-to-end test of the decoder's wrap-around metric
// arithmetic. A small decoder (K = 5, generators 23 and 35 octal, L = 30,
// 4 processors) with 8-bit metrics runs 40 blocks over a channel that is noisy
// throughout, so the accumulated metrics pass through the 8-bit range many
// times. Every output from bit time 4L on must equal the bit-exact software
// model, which uses unbounded integer metrics; the test also checks the S+3
// cycle bit time, that all six block types occurred and that the model's
// metrics did exceed 2^8.
module tb_tbvd_top_wrap;
  import tbvd_pkg::*;
  import tbvd_ref_pkg::*;

  localparam int K = 5, L = 30, NPROC = 4, Q = DEF_Q, W = 8;
  localparam int G0 = 'o23, G1 = 'o35;
  localparam int S = (1 << (K - 1)) / NPROC;
  localparam int T = S + 3;
  localparam int D = 4 * L + K - 1;
  localparam int NBITS = 40 * L;
  localparam int NOISE_LO = 0, NOISE_HI = NBITS;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready;
  logic [Q-1:0] in_r0 = '0, in_r1 = '0;
  logic out_valid, out_bit, blk_start, blk_par;
  bank_t bank_tb, bank_dec;

  tbvd_top #(.K(K), .L(L), .NPROC(NPROC), .W(W), .G0(G0), .G1(G1)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  bit info [NBITS];
  bit refq [NBITS];
  int nout = 0, cyc = 0, last_acc = -1, stalls = 0, chan_err = 0, bit_err = 0;
  int blk_type [6];
  bit prev_stalled = 0;

  tbvd_ref #(K, L, Q, G0, G1) refm;
  tbvd_encoder #(K, G0, G1) enc;

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
      s0 = channel(c[1], Q, (n >= NOISE_LO && n < NOISE_HI) ? 12 : 0);
      s1 = channel(c[0], Q, (n >= NOISE_LO && n < NOISE_HI) ? 12 : 0);
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
    check(refm.metric[0][0] > 4 * (1 << W), "metrics never wrapped");
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
