// tb_vedic_div8: exhaustive check of the 8-by-8 Vedic divider.
//  - every (a, b) against the integer model of the algorithm;
//  - with b = 01010101 (the cipher key of the worked example) against true
//    division for every a;
//  - the five Table-1 style vectors ("Wiley", bit-reversed);
//  - the correction pass must occur.
module tb_vedic_div8;
  import vedic_ref_pkg::*;
  logic [7:0] a, b, r;
  logic [1:0] q;
  int checks = 0, failures = 0;
  int n_corr = 0, n_eq = 0;

  vedic_div8 dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // n, expected q, expected r for W, i, l, e, y with key 01010101
    static logic [7:0] tn [5] = '{8'b11101010, 8'b10010110, 8'b00110110, 8'b10100110, 8'b10011110};
    static logic [1:0] tq [5] = '{2'b10, 2'b01, 2'b00, 2'b01, 2'b01};
    static logic [7:0] tr [5] = '{8'b01000000, 8'b01000001, 8'b00110110, 8'b01010001, 8'b01001001};

    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        div_res_t e;
        a = 8'(i); b = 8'(j);
        #1;
        e = ref_div8(i, j);
        n_corr += int'(e.corrected);
        n_eq   += int'(e.c_eq_d);
        checks++;
        if (q !== e.q || r !== e.r) begin
          failures++;
          if (failures < 10)
            $display("FAIL model %0d/%0d -> q=%0d r=%0d exp q=%0d r=%0d", i, j, q, r, e.q, e.r);
        end
        if (j == 85) begin  // key 01010101
          checks++;
          if (q !== 2'(i / j) || r !== 8'(i % j)) begin
            failures++;
            $display("FAIL true %0d/%0d -> q=%0d r=%0d", i, j, q, r);
          end
        end
      end
    for (int k = 0; k < 5; k++) begin
      a = tn[k]; b = 8'b01010101;
      #1;
      checks++;
      if (q !== tq[k] || r !== tr[k]) begin
        failures++;
        $display("FAIL table row %0d: q=%b r=%b", k, q, r);
      end
    end
    $display("corrections=%0d c_eq_d=%0d", n_corr, n_eq);
    if (n_corr == 0 || n_eq == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
