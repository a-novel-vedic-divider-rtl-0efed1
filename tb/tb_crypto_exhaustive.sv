// tb_crypto_exhaustive: exhaustive test of the crypto-hardware, every
// character with every key (65536 operations, one per cycle).
//
// For each pair the cipher word is compared with the integer model of the
// division algorithm and the recovered character with q*k + r reversed. It
// also counts the keys for which every one of the 256 characters comes back
// unchanged after encryption and decryption, and the keys for which the
// divider gives the true quotient and remainder for every character. Both
// counts are printed; the test requires the key 01010101 of the worked
// example to be in both sets and every key below 64 to be in neither (the
// quotient would need more than two bits).
module tb_crypto_exhaustive;
  import vedic_ref_pkg::*;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       in_valid = 1'b0;
  logic [7:0] msg_in = '0, key = '0;
  logic       out_valid;
  logic [9:0] cipher_out;
  logic [1:0] q_out;
  logic [7:0] r_out, msg_out;

  int checks = 0, failures = 0;
  bit key_roundtrip [256];
  bit key_exact [256];
  logic [15:0] pend[$];   // {key, msg} of each accepted operation

  crypto_top dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    for (int i = 0; i < 70000; i++) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      logic [7:0] m, k;
      div_res_t e;
      int n;
      {k, m} = pend.pop_front();
      n = int'(rev8(m));
      e = ref_div8(n, int'(k));
      checks++;
      if (cipher_out !== {e.r, e.q}
          || msg_out !== rev8(8'((int'(e.q) * int'(k) + int'(e.r)) & 255))) begin
        failures++;
        if (failures < 10) $display("FAIL x=%b k=%b -> y=%b m=%b", m, k, cipher_out, msg_out);
      end
      if (msg_out != m) key_roundtrip[k] = 1'b0;
      if (k == 0 || int'(q_out) != n / int'(k) || int'(r_out) != n % int'(k)) key_exact[k] = 1'b0;
    end
  end

  initial begin
    int n_rt, n_ex;
    foreach (key_roundtrip[i]) begin
      key_roundtrip[i] = 1'b1;
      key_exact[i] = 1'b1;
    end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int k = 0; k < 256; k++)
      for (int m = 0; m < 256; m++) begin
        in_valid <= 1'b1;
        msg_in   <= 8'(m);
        key      <= 8'(k);
        pend.push_back({8'(k), 8'(m)});
        @(posedge clk);
      end
    in_valid <= 1'b0;
    repeat (4) @(posedge clk);
    checks++;
    if (pend.size() != 0) begin
      failures++;
      $display("FAIL %0d results missing", pend.size());
    end
    n_rt = 0;
    n_ex = 0;
    for (int k = 0; k < 256; k++) begin
      n_rt += int'(key_roundtrip[k]);
      n_ex += int'(key_exact[k]);
    end
    $display("keys with exact round trip: %0d, keys with exact division: %0d", n_rt, n_ex);
    checks++;
    if (!key_roundtrip[8'b01010101] || !key_exact[8'b01010101]) begin
      failures++;
      $display("FAIL key 01010101 not exact");
    end
    for (int k = 0; k < 64; k++) begin
      checks++;
      if (key_roundtrip[k] || key_exact[k]) begin
        failures++;
        $display("FAIL key %0d below 64 reported exact", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
