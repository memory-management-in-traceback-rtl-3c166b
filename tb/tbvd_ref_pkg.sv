// tbvd_ref_pkg: bit-exact software model of the three-bank traceback
// algorithm, used by the testbenches as the expected behaviour, plus a
// convolutional encoder and a simple noisy channel.
//
// The model keeps the decision memory as RAM[state][column][bank], the
// accumulated metrics as M[state][bit_par] in unbounded integers, and the
// traceback and decoding states; step() runs one bit time in the order
// block-start hand-over, decoding read, traceback read, add-compare-select
// write, and returns the bit sent out after order reversal.
package tbvd_ref_pkg;

  class tbvd_ref #(int K = 7, int L = 100, int Q = 3, int G0 = 'o171, int G1 = 'o133);
    localparam int NS  = 1 << (K - 1);
    localparam int NS2 = NS / 2;
    localparam int QM  = (1 << Q) - 1;

    int metric [NS][2];
    bit ram    [NS][L][3];
    bit out_a  [L];
    bit outr   [L];
    int state_tb, state_dec, tb, dec, blk_par, t;
    int handoffs_nonzero;

    function new();
      foreach (metric[j, h]) metric[j][h] = 0;
      foreach (ram[j, c, b]) ram[j][c][b] = 0;
      foreach (out_a[i]) begin out_a[i] = 0; outr[i] = 0; end
      state_tb = 0; state_dec = 0; tb = 0; dec = 1; blk_par = 0; t = 0;
      handoffs_nonzero = 0;
    endfunction

    static function int label(int win);
      int a, b;
      a = $countones(win & G0) % 2;
      b = $countones(win & G1) % 2;
      return a * 2 + b;
    endfunction

    static function int bm(int r, int b);
      return (b != 0) ? QM - r : r;
    endfunction

    function bit step(int r0, int r1);
      int m, m1, bit_par, c, l0, l1, i;
      int d [4];
      bit res;
      m = t % L;
      bit_par = t % 2;
      if (m == 0) begin
        blk_par = (t / L) % 2;
        tb = (t / L) % 3;
        dec = (tb + 1) % 3;
        state_dec = state_tb;
        if (state_dec != 0) handoffs_nonzero++;
        state_tb = 0;
        outr = out_a;
      end
      m1 = (blk_par == 0) ? L - m - 1 : m;
      state_dec = (state_dec >> 1) | (NS2 * ram[state_dec][m1][dec]);
      state_tb  = (state_tb >> 1) | (NS2 * ram[state_tb][m1][tb]);
      out_a[m]  = 1'((state_dec >> (K - 2)) & 1);
      for (int cc = 0; cc < 4; cc++) d[cc] = bm(r0, (cc >> 1) & 1) + bm(r1, cc & 1);
      for (int j = 0; j < NS; j++) begin
        i  = j >> 1;
        c  = label(j);
        l0 = metric[i][bit_par ^ 1] + d[c];
        l1 = metric[i | NS2][bit_par ^ 1] + d[3 - c];
        if (l1 < l0) begin
          metric[j][bit_par] = l1;
          ram[j][m1][dec] = 1;
        end else begin
          metric[j][bit_par] = l0;
          ram[j][m1][dec] = 0;
        end
      end
      res = outr[L - 1 - m];
      t++;
      return res;
    endfunction
  endclass

  // Rate-1/2 encoder: window bit 0 is the newest bit.
  class tbvd_encoder #(int K = 7, int G0 = 'o171, int G1 = 'o133);
    int sr = 0;
    function int encode(bit u);
      int win;
      win = ((sr << 1) | int'(u)) & ((1 << K) - 1);
      sr  = win & ((1 << (K - 1)) - 1);
      return tbvd_ref#(K, 8, 3, G0, G1)::label(win);
    endfunction
  endclass

  // Ideal soft symbol of a code bit, optionally disturbed: with probability
  // 1/nrand a uniformly random value, else with probability 1/4 moved by one
  // step towards the middle.
  function automatic int channel(bit b, int q, int nrand);
    int qm, v;
    qm = (1 << q) - 1;
    v  = b ? qm : 0;
    if (nrand > 0) begin
      if ($urandom_range(nrand - 1) == 0) v = $urandom_range(qm);
      else if ($urandom_range(3) == 0) v = b ? qm - 1 : 1;
    end
    return v;
  endfunction

endpackage
