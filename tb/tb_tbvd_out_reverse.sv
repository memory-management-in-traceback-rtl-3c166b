// tb_tbvd_out_reverse: writes random blocks of L bits in step order and
// checks that during the next block step m reads bit L-1-m of the block
// before.
module tb_tbvd_out_reverse;
  localparam int L = 12;
  localparam int MW = $clog2(L);
  logic clk = 0, rst_n = 0;
  logic [MW-1:0] m = '0;
  logic blk_par = 0, wr_en = 0, wr_bit = 0, out_bit;
  int checks = 0, failures = 0;
  bit blocks [8][L];

  tbvd_out_reverse #(.L(L)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int b = 0; b < 8; b++) begin
      for (int s = 0; s < L; s++) begin
        @(negedge clk);
        blk_par = 1'(b % 2);
        m = MW'(s);
        wr_en = 1;
        wr_bit = 1'($urandom_range(1));
        blocks[b][s] = wr_bit;
        #1;
        if (b > 0) begin
          checks++;
          if (out_bit != blocks[b - 1][L - 1 - s]) begin
            failures++;
            $display("FAIL block %0d step %0d", b, s);
          end
        end
      end
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
