// tb_mult2x2: exhaustive check of the 2-bit multiplier against a * b.
module tb_mult2x2;
  logic [1:0] a, b;
  logic [3:0] p;
  int checks = 0, failures = 0;

  mult2x2 dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        a = 2'(i); b = 2'(j);
        #1;
        checks++;
        if (p !== 4'(i * j)) begin
          failures++;
          $display("FAIL %0d*%0d -> %0d", i, j, p);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
