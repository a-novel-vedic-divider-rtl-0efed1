// tb_div2x2: exhaustive check of the 2-by-2 divider against integer / and %
// for every non-zero divisor, and the defined 00/00 outputs for divisor 0.
module tb_div2x2;
  logic [1:0] a, b, q, r;
  int checks = 0, failures = 0;

  div2x2 dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        int eq_v, er_v;
        a = 2'(i); b = 2'(j);
        #1;
        eq_v = (j == 0) ? 0 : i / j;
        er_v = (j == 0) ? 0 : i % j;
        checks++;
        if (q !== 2'(eq_v) || r !== 2'(er_v)) begin
          failures++;
          $display("FAIL %0d/%0d -> q=%0d r=%0d", i, j, q, r);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
