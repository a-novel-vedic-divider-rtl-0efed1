// tb_vedic_div4: exhaustive check of the 4-by-4 Vedic divider.
//  - every (a, b) against the integer model of the algorithm;
//  - wherever the true quotient is at most 3 and within one of A2/B2, against
//    true division (this covers both worked examples: 1111/1010 = 01 r 0101
//    and 1110/0101 = 10 r 0100);
//  - the correction pass (C < D) and the C = D case must both occur.
module tb_vedic_div4;
  import vedic_ref_pkg::*;
  logic [3:0] a, b, r;
  logic [1:0] q;
  int checks = 0, failures = 0;
  int n_corr = 0, n_eq = 0, n_true = 0;

  vedic_div4 dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        div_res_t e;
        int est, est_rt;
        a = 4'(i); b = 4'(j);
        #1;
        e = ref_div4(i, j);
        n_corr += int'(e.corrected);
        n_eq   += int'(e.c_eq_d);
        checks++;
        if (q !== e.q || r !== e.r[3:0]) begin
          failures++;
          $display("FAIL model %0d/%0d -> q=%0d r=%0d exp q=%0d r=%0d", i, j, q, r, e.q, e.r);
        end
        // The algorithm is exact when the true quotient fits in 2 bits, the
        // first estimate is at most one too large, and a correction only
        // happens with a zero first remainder.
        est    = int'(ref_div2(i >> 2, j >> 2).q);
        est_rt = int'(ref_div2(i >> 2, j >> 2).r);
        if (j != 0 && i / j <= 3 && (est - i / j) inside {0, 1}
            && (!e.corrected || est_rt == 0)) begin
          n_true++;
          checks++;
          if (q !== 2'(i / j) || r !== 4'(i % j)) begin
            failures++;
            $display("FAIL true %0d/%0d -> q=%0d r=%0d", i, j, q, r);
          end
        end
      end
    // Worked examples.
    a = 4'b1111; b = 4'b1010; #1;
    checks++; if (q !== 2'b01 || r !== 4'b0101) begin failures++; $display("FAIL ex1"); end
    a = 4'b1110; b = 4'b0101; #1;
    checks++; if (q !== 2'b10 || r !== 4'b0100) begin failures++; $display("FAIL ex2"); end
    $display("corrections=%0d c_eq_d=%0d true_division_checks=%0d", n_corr, n_eq, n_true);
    if (n_corr == 0 || n_eq == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
