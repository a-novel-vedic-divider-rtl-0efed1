// tb_subtractor: exhaustive check of the 4-bit subtractor (default width) and
// an 8-bit instance against integer subtraction and the a >= b flag.
module tb_subtractor;
  logic [3:0] a4, b4, d4;
  logic [7:0] a8, b8, d8;
  logic       nb4, nb8;
  int checks = 0, failures = 0;

  subtractor dut4 (.a(a4), .b(b4), .diff(d4), .no_borrow(nb4));
  subtractor #(.W(8)) dut8 (.a(a8), .b(b8), .diff(d8), .no_borrow(nb8));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        a4 = 4'(i); b4 = 4'(j);
        #1;
        checks++;
        if (d4 !== 4'(i - j) || nb4 !== (i >= j)) begin
          failures++;
          $display("FAIL4 %0d-%0d -> %0d nb=%b", i, j, d4, nb4);
        end
      end
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        a8 = 8'(i); b8 = 8'(j);
        #1;
        checks++;
        if (d8 !== 8'(i - j) || nb8 !== (i >= j)) begin
          failures++;
          if (failures < 10) $display("FAIL8 %0d-%0d -> %0d nb=%b", i, j, d8, nb8);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
