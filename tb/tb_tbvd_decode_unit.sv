// tb_tbvd_decode_unit: random decision bits are fed to the decoding pointer;
// at every block start it must take the given initial state. After each step
// its address must be (state >> 1) | bit * 2^(K-2) and the decoded bit, valid
// for one cycle, the top bit of that new state.
module tb_tbvd_decode_unit;
  localparam int K = 7;
  logic clk = 0, rst_n = 0, start = 0, cap = 0, bit_in = 0;
  logic [K-2:0] init_state = '0, addr;
  logic out_valid, out_bit;
  int checks = 0, failures = 0, expst = 0, nvalid = 0, ncap = 0;

  tbvd_decode_unit #(.K(K)) dut (.*);
  always #5 clk = ~clk;

  always @(negedge clk) if (out_valid) nvalid++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      if (n % 23 == 0) begin
        start = 1;
        init_state = (K-1)'($urandom_range((1 << (K - 1)) - 1));
        @(negedge clk);
        start = 0;
        expst = int'(init_state);
        check(int'(addr) == expst, "start state");
      end
      cap = 1;
      bit_in = 1'($urandom_range(1));
      @(negedge clk);
      cap = 0;
      ncap++;
      expst = (expst >> 1) | (int'(bit_in) << (K - 2));
      check(int'(addr) == expst, "next state");
      check(out_valid == 1'b1, "out_valid");
      check(out_bit == 1'((expst >> (K - 2)) & 1), "decoded bit");
      repeat ($urandom_range(2)) @(negedge clk);
    end
    @(negedge clk);
    check(nvalid == ncap, "one output per step");
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
