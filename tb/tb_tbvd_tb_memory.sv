// tb_tbvd_tb_memory: fills all three banks of a small traceback memory
// (K = 5, L = 6, 4 processors) column by column with random decision bits,
// as the processors do, then reads random cells over the shared bus and
// compares with a shadow copy; it then rewrites one column while reading the
// others, and checks that a read returns its bit one cycle later and holds it.
module tb_tbvd_tb_memory;
  import tbvd_pkg::*;
  localparam int K = 5, L = 6, NPROC = 4;
  localparam int NS = 1 << (K - 1), S = NS / NPROC;
  logic clk = 0, rst_n = 0, we = 0, rd_en = 0, rd_bit;
  bank_t wr_bank = '0, rd_bank = '0;
  logic [$clog2(L)-1:0] wr_m = '0, rd_m = '0;
  logic [$clog2(S)-1:0] wr_row = '0;
  logic [NPROC-1:0] wr_bits = '0;
  logic [K-2:0] rd_state = '0;
  int checks = 0, failures = 0;
  bit shadow [3][L][NS];

  tbvd_tb_memory #(.K(K), .L(L), .NPROC(NPROC)) dut (.*);
  always #5 clk = ~clk;

  task automatic write_column(int b, int c);
    for (int s = 0; s < S; s++) begin
      we = 1;
      wr_bank = bank_t'(b);
      wr_m = ($clog2(L))'(c);
      wr_row = ($clog2(S))'(s);
      for (int p = 0; p < NPROC; p++) begin
        wr_bits[p] = 1'($urandom_range(1));
        shadow[b][c][p * S + s] = wr_bits[p];
      end
      @(negedge clk);
    end
    we = 0;
  endtask

  task automatic read_check(int b, int c, int st);
    bit e;
    rd_en = 1;
    rd_bank = bank_t'(b);
    rd_m = ($clog2(L))'(c);
    rd_state = (K-1)'(st);
    e = shadow[b][c][st];
    @(negedge clk);
    rd_en = 0;
    checks++;
    if (rd_bit != e) begin
      failures++;
      if (failures < 10) $display("FAIL bank %0d col %0d state %0d", b, c, st);
    end
    @(negedge clk);
    checks++;
    if (rd_bit != e) failures++;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int b = 0; b < 3; b++)
      for (int c = 0; c < L; c++) write_column(b, c);
    for (int n = 0; n < 300; n++)
      read_check($urandom_range(2), $urandom_range(L - 1), $urandom_range(NS - 1));
    write_column(1, 3);
    for (int st = 0; st < NS; st++) begin
      read_check(1, 3, st);
      read_check(2, 3, st);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
