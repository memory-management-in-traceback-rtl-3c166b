// tb_tbvd_traceback_unit: random decision bits are fed to the traceback
// pointer, with a restart every few steps; after every step its address must
// equal the state computed as (state >> 1) | bit * 2^(K-2), and 0 after a
// restart.
module tb_tbvd_traceback_unit;
  localparam int K = 7;
  logic clk = 0, rst_n = 0, start = 0, cap = 0, bit_in = 0;
  logic [K-2:0] addr;
  int checks = 0, failures = 0, expst = 0;

  tbvd_traceback_unit #(.K(K)) dut (.*);
  always #5 clk = ~clk;

  task automatic check_state();
    checks++;
    if (int'(addr) != expst) begin
      failures++;
      if (failures < 10) $display("FAIL addr %0d exp %0d", addr, expst);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check_state();
    for (int n = 0; n < 500; n++) begin
      if (n % 37 == 5) begin
        start = 1;
        @(negedge clk);
        start = 0;
        expst = 0;
        check_state();
      end
      cap = 1;
      bit_in = 1'($urandom_range(1));
      @(negedge clk);
      cap = 0;
      expst = (expst >> 1) | (int'(bit_in) << (K - 2));
      check_state();
      repeat ($urandom_range(2)) @(negedge clk);
      check_state();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
