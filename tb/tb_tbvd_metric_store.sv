// tb_tbvd_metric_store: writes random metrics for all states, S states per
// bit time through NPROC write ports, into the half chosen by the bit parity,
// and checks in the following bit time that random reads through every read
// port return the values of the previous bit time, and that reset clears
// the store.
module tb_tbvd_metric_store;
  localparam int NS = 16, NPROC = 4, W = 8, S = NS / NPROC;
  localparam int IW = $clog2(NS);
  logic clk = 0, rst_n = 0, par = 0, we = 0;
  logic [IW-1:0] rd_idx_up [NPROC], rd_idx_lo [NPROC], wr_idx [NPROC];
  logic [W-1:0]  rd_up [NPROC], rd_lo [NPROC], wr_data [NPROC];
  int checks = 0, failures = 0;
  int shadow [2][NS];

  tbvd_metric_store #(.NS(NS), .NPROC(NPROC), .W(W)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  task automatic read_all(int h);
    for (int k = 0; k < 8; k++) begin
      for (int p = 0; p < NPROC; p++) begin
        rd_idx_up[p] = IW'($urandom_range(NS - 1));
        rd_idx_lo[p] = IW'($urandom_range(NS - 1));
      end
      #1;
      for (int p = 0; p < NPROC; p++) begin
        check(int'(rd_up[p]) == shadow[h][rd_idx_up[p]], "read up");
        check(int'(rd_lo[p]) == shadow[h][rd_idx_lo[p]], "read lo");
      end
    end
  endtask

  initial begin
    foreach (shadow[h, s]) shadow[h][s] = 0;
    for (int p = 0; p < NPROC; p++) begin
      rd_idx_up[p] = '0; rd_idx_lo[p] = '0; wr_idx[p] = '0; wr_data[p] = '0;
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    par = 1; read_all(0);
    par = 0; read_all(1);
    for (int t = 0; t < 20; t++) begin
      par = 1'(t % 2);
      // reads of the previous bit time's metrics (half par ^ 1)
      read_all(1 - t % 2);
      for (int s = 0; s < S; s++) begin
        @(negedge clk);
        we = 1;
        for (int p = 0; p < NPROC; p++) begin
          wr_idx[p]  = IW'(p * S + s);
          wr_data[p] = W'($urandom_range((1 << W) - 1));
          shadow[t % 2][p * S + s] = int'(wr_data[p]);
        end
      end
      @(negedge clk);
      we = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
