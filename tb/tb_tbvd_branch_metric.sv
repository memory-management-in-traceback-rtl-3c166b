// tb_tbvd_branch_metric: exhaustive test of the branch metrics for every
// pair of 3-bit soft symbols against |r - ideal| summed over both symbols.
module tb_tbvd_branch_metric;
  localparam int Q = 3;
  logic [Q-1:0] r0, r1;
  logic [Q:0]   d [4];
  int checks = 0, failures = 0;

  tbvd_branch_metric #(.Q(Q)) dut (.r0(r0), .r1(r1), .d(d));

  initial begin
    int e, i0, i1;
    for (int a = 0; a < 8; a++)
      for (int b = 0; b < 8; b++) begin
        r0 = Q'(a); r1 = Q'(b);
        #1;
        for (int c = 0; c < 4; c++) begin
          i0 = ((c >> 1) & 1) * 7;
          i1 = (c & 1) * 7;
          e  = (a > i0 ? a - i0 : i0 - a) + (b > i1 ? b - i1 : i1 - b);
          checks++;
          if (int'(d[c]) != e) begin
            failures++;
            $display("FAIL r=%0d,%0d c=%0d d=%0d exp %0d", a, b, c, d[c], e);
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
