// tb_decrementer: checks the 2-bit decrementer, including the 00 -> 11 wrap.
module tb_decrementer;
  logic [1:0] a, y;
  int checks = 0, failures = 0;

  decrementer dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      a = 2'(i);
      #1;
      checks++;
      if (y !== 2'((i + 3) % 4)) begin
        failures++;
        $display("FAIL %0d -> %0d", i, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
