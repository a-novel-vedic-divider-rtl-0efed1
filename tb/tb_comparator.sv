// tb_comparator: exhaustive check of the 4-bit comparator (default width) and
// the 8-bit instance: exactly the right one of gt / eq / lt must be high.
module tb_comparator;
  logic [3:0] a4, b4;
  logic [7:0] a8, b8;
  logic gt4, eq4, lt4, gt8, eq8, lt8;
  int checks = 0, failures = 0;

  comparator dut4 (.a(a4), .b(b4), .gt(gt4), .eq(eq4), .lt(lt4));
  comparator #(.W(8)) dut8 (.a(a8), .b(b8), .gt(gt8), .eq(eq8), .lt(lt8));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        a8 = 8'(i); b8 = 8'(j); a4 = 4'(i); b4 = 4'(j);
        #1;
        checks++;
        if ({gt8, eq8, lt8} !== {i > j, i == j, i < j}) begin
          failures++;
          if (failures < 10) $display("FAIL8 %0d vs %0d -> %b%b%b", i, j, gt8, eq8, lt8);
        end
        if (i < 16 && j < 16) begin
          checks++;
          if ({gt4, eq4, lt4} !== {i > j, i == j, i < j}) begin
            failures++;
            $display("FAIL4 %0d vs %0d -> %b%b%b", i, j, gt4, eq4, lt4);
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
