// tb_mult_nx2: exhaustive check of the 4-by-2 multiplier (default width) and
// the 8-by-2 instance used for decryption, against integer products.
module tb_mult_nx2;
  logic [3:0] a4;
  logic [7:0] a8;
  logic [1:0] b;
  logic [5:0] p4;
  logic [9:0] p8;
  int checks = 0, failures = 0;

  mult_nx2 dut4 (.a(a4), .b(b), .p(p4));
  mult_nx2 #(.W(8)) dut8 (.a(a8), .b(b), .p(p8));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 4; j++) begin
        a4 = 4'(i); a8 = 8'(i); b = 2'(j);
        #1;
        checks++;
        if (p8 !== 10'(i * j)) begin
          failures++;
          $display("FAIL8 %0d*%0d -> %0d", i, j, p8);
        end
        if (i < 16) begin
          checks++;
          if (p4 !== 6'(i * j)) begin
            failures++;
            $display("FAIL4 %0d*%0d -> %0d", i, j, p4);
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
