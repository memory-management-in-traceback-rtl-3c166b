// tb_tbvd_bank_ctrl: runs the bank controller (L = 5, S = 2) through 14
// blocks with random input pauses. For every bit time t it checks, against
// the formulas m = t mod L, blk_par = (t/L) mod 2, traceback bank = (t/L)
// mod 3, decoding bank = traceback bank + 1 mod 3, m1 = L-1-m (even block)
// or m (odd block) and bit_par = t mod 2, and that each strobe fires in its
// phase, once per bit time, and that a bit time lasts S+3 cycles.
module tb_tbvd_bank_ctrl;
  import tbvd_pkg::*;
  localparam int L = 5, S = 2, T = S + 3, NB = 14 * L;
  localparam int MW = $clog2(L);
  logic clk = 0, rst_n = 0, in_valid = 0, in_ready, busy;
  strobes_t strb;
  logic [0:0] acs_step;
  logic [MW-1:0] m, m1;
  logic blk_start, blk_par, bit_par;
  bank_t bank_tb, bank_dec;
  int checks = 0, failures = 0, t = -1, ph = 0, nacs = 0, stalls = 0;
  int cnt_load, cnt_dec_rd, cnt_tb_rd, cnt_tb_cap, cnt_done;

  tbvd_bank_ctrl #(.L(L), .S(S)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL t=%0d ph=%0d: %s", t, ph, what);
    end
  endtask

  // Check at each negedge; ph counts cycles since the bit time started.
  always @(negedge clk) begin
    if (rst_n && busy) begin
      int blk;
      blk = t / L;
      check(int'(m) == t % L, "m");
      check(int'(blk_par) == blk % 2, "blk_par");
      check(int'(bit_par) == t % 2, "bit_par");
      check(int'(bank_tb) == blk % 3, "bank_tb");
      check(int'(bank_dec) == (blk % 3 + 1) % 3, "bank_dec");
      check(int'(m1) == ((blk % 2 == 0) ? L - 1 - t % L : t % L), "m1");
      check(blk_start == (t % L == 0), "blk_start");
      check(strb.load == (ph == 0), "load");
      check(strb.dec_rd == (ph == 1), "dec_rd");
      check(strb.tb_rd == (ph == 2) && strb.dec_cap == (ph == 2), "tb_rd/dec_cap");
      check(strb.tb_cap == (ph == 3), "tb_cap");
      check(strb.acs_en == (ph >= 3 && ph < 3 + S), "acs_en");
      if (strb.acs_en) check(int'(acs_step) == ph - 3, "acs_step");
      check(strb.bit_done == (ph == T - 1), "bit_done");
      check(in_ready == (ph == T - 1), "in_ready in bit time");
      check(ph < T, "bit time too long");
      cnt_load += strb.load; cnt_dec_rd += strb.dec_rd; cnt_tb_rd += strb.tb_rd;
      cnt_tb_cap += strb.tb_cap; cnt_done += strb.bit_done;
      if (strb.acs_en) nacs++;
    end else if (rst_n) begin
      check(in_ready == 1'b1, "ready when idle");
      check(strb == '0, "no strobes when idle");
    end
  end

  // Track bit-time starts: a transfer at a posedge starts phase 0.
  always @(posedge clk) begin
    if (rst_n) begin
      if (in_valid && in_ready) begin
        t <= t + 1;
        ph <= 0;
      end else begin
        ph <= ph + 1;
      end
    end
  end

  initial begin
    cnt_load = 0; cnt_dec_rd = 0; cnt_tb_rd = 0; cnt_tb_cap = 0; cnt_done = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < NB; n++) begin
      if ($urandom_range(4) == 0) begin
        in_valid = 0;
        repeat ($urandom_range(1, 3)) @(negedge clk);
        stalls++;
      end
      in_valid = 1;
      while (!in_ready) @(negedge clk);
      @(negedge clk);
    end
    in_valid = 0;
    repeat (T + 2) @(negedge clk);
    check(cnt_load == NB && cnt_dec_rd == NB && cnt_tb_rd == NB && cnt_tb_cap == NB && cnt_done == NB,
          "one strobe of each kind per bit time");
    check(nacs == NB * S, "S add-compare-select steps per bit time");
    check(stalls > 0, "stalls happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NB * (T + 5) + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
