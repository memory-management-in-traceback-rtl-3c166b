// tb_tbvd_acs: add-compare-select with random states, branch metrics and
// metrics placed anywhere in the wrapping W-bit range (including across the
// wrap), against unbounded integer arithmetic: decision 1 exactly when
// L1 < L0, and the surviving sum modulo 2^W.
module tb_tbvd_acs;
  localparam int K = 7, Q = 3, W = 10;
  logic [K-2:0] state;
  logic [W-1:0] m_up, m_lo, m_new;
  logic [Q:0]   d [4];
  logic         decision;
  int checks = 0, failures = 0, ones = 0, wraps = 0;

  tbvd_acs #(.K(K), .Q(Q), .W(W)) dut (.*);

  function automatic int lab(int win);
    return ($countones(win & 'o171) % 2) * 2 + ($countones(win & 'o133) % 2);
  endfunction

  initial begin
    int base, a, b, c, l0, l1, exp_m;
    bit exp_d;
    for (int n = 0; n < 4000; n++) begin
      state = (K-1)'($urandom_range((1 << (K - 1)) - 1));
      for (int i = 0; i < 4; i++) d[i] = (Q+1)'($urandom_range(14));
      base = $urandom_range((1 << W) - 1);
      a = base + $urandom_range(60);
      b = base + $urandom_range(60);
      m_up = W'(a);
      m_lo = W'(b);
      #1;
      c  = lab(int'(state));
      l0 = a + int'(d[c]);
      l1 = b + int'(d[3 - c]);
      exp_d = l1 < l0;
      exp_m = (exp_d ? l1 : l0) % (1 << W);
      if ((exp_d ? l1 : l0) >= (1 << W) && base < (1 << W)) wraps++;
      checks++;
      if (decision != exp_d || int'(m_new) != exp_m) begin
        failures++;
        if (failures < 10) $display("FAIL j=%0d a=%0d b=%0d dec=%0d m=%0d exp %0d %0d", state, a, b, decision, m_new, exp_d, exp_m);
      end
      if (decision) ones++;
    end
    checks++;
    if (ones == 0 || wraps == 0) failures++;
    $display("decisions=1: %0d, wrapped sums: %0d", ones, wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
