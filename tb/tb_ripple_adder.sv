// tb_ripple_adder: exhaustive check of the 8-bit ripple adder (all a, b and
// both carry-ins) against integer addition.
module tb_ripple_adder;
  localparam int W = 8;
  logic [W-1:0] a, b, sum;
  logic         cin, cout;
  int checks = 0, failures = 0;

  ripple_adder #(.W(W)) dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << W); i++)
      for (int j = 0; j < (1 << W); j++)
        for (int c = 0; c < 2; c++) begin
          int exp_v;
          a = W'(i); b = W'(j); cin = c[0];
          #1;
          exp_v = i + j + c;
          checks++;
          if ({cout, sum} !== (W+1)'(exp_v)) begin
            failures++;
            if (failures < 10) $display("FAIL %0d+%0d+%0d -> %0d", i, j, c, {cout, sum});
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
