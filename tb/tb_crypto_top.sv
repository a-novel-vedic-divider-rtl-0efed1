// tb_crypto_top: end-to-end test of the crypto-hardware at its default sizes.
//
// Streams characters through encryption and loop-back decryption and checks,
// for every character, the cipher word against bit-reversal plus integer
// division by the key model, the recovered character against the input, and
// that each result appears exactly two cycles after it was presented.
// Phases: the "Wiley" string of the worked example with key 01010101 (cipher
// words compared with the published ones), all 256 characters with that key,
// then random characters with random keys, with gaps in in_valid. Counts how
// often the divider's first pass had C > D, C = D and C < D (correction pass)
// and fails if one of them never happened.
module tb_crypto_top;
  import vedic_ref_pkg::*;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       in_valid = 1'b0;
  logic [7:0] msg_in = '0, key = '0;
  logic       out_valid;
  logic [9:0] cipher_out;
  logic [1:0] q_out;
  logic [7:0] r_out, msg_out;

  int checks = 0, failures = 0;
  int n_gt = 0, n_eq = 0, n_corr = 0, n_out = 0;

  crypto_top dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    for (int i = 0; i < 20000; i++) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected-result queue, one entry per accepted character.
  typedef struct {
    logic [7:0] msg;
    logic [7:0] key;
    int         cycle_in;
  } job_t;
  job_t jobs[$];
  logic [17:0] got[$];   // {cipher_out, msg_out} of every result
  int   cycle = 0;

  always @(posedge clk) cycle <= cycle + 1;

  // Scoreboard.
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      job_t j;
      div_res_t e;
      int n;
      n_out++;
      got.push_back({cipher_out, msg_out});
      if (jobs.size() == 0) begin
        failures++;
        $display("FAIL output with no pending input");
      end else begin
        j = jobs.pop_front();
        n = int'(rev8(j.msg));
        e = ref_div8(n, int'(j.key));
        if (e.corrected) n_corr++;
        else if (e.c_eq_d) n_eq++;
        else n_gt++;
        checks++;
        if (cycle - j.cycle_in != 2) begin
          failures++;
          $display("FAIL latency %0d cycles", cycle - j.cycle_in);
        end
        checks++;
        if (q_out !== e.q || r_out !== e.r || cipher_out !== {e.r, e.q}) begin
          failures++;
          $display("FAIL cipher x=%b k=%b -> %b expected %b", j.msg, j.key, cipher_out, {e.r, e.q});
        end
        // With the key of the worked example the divider is exact, so the
        // round trip must give the character back.
        if (j.key == 8'b01010101) begin
          checks++;
          if (q_out !== 2'(n / 85) || r_out !== 8'(n % 85) || msg_out !== j.msg) begin
            failures++;
            $display("FAIL round trip x=%b -> %b", j.msg, msg_out);
          end
        end else begin
          checks++;
          if (msg_out !== rev8(8'((int'(e.q) * int'(j.key) + int'(e.r)) & 255))) begin
            failures++;
            $display("FAIL decrypt x=%b k=%b -> %b", j.msg, j.key, msg_out);
          end
        end
      end
    end
  end

  task automatic send(input logic [7:0] m, input logic [7:0] k);
    msg_in   <= m;
    key      <= k;
    in_valid <= 1'b1;
    jobs.push_back('{msg: m, key: k, cycle_in: cycle + 1});
    @(posedge clk);
  endtask

  // n idle cycles with in_valid low and junk on the data inputs.
  task automatic idle(input int n);
    if (n == 0) return;
    in_valid <= 1'b0;
    msg_in   <= 8'($urandom);
    key      <= 8'($urandom);
    repeat (n) @(posedge clk);
  endtask

  initial begin
    static logic [7:0] txt [5] = '{"W", "i", "l", "e", "y"};
    static logic [9:0] exp_y [5] = '{10'b0100000010, 10'b0100000101, 10'b0011011000,
                              10'b0101000101, 10'b0100100101};
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);

    // Worked example, back to back.
    for (int k = 0; k < 5; k++) send(txt[k], 8'b01010101);
    idle(3);
    checks++;
    if (got.size() != 5) begin
      failures++;
      $display("FAIL %0d results for the worked example", got.size());
    end else begin
      for (int k = 0; k < 5; k++) begin
        checks++;
        if (got[k] !== {exp_y[k], txt[k]}) begin
          failures++;
          $display("FAIL Wiley[%0d] y=%b msg=%c", k, got[k][17:8], got[k][7:0]);
        end
      end
    end

    // Every character with the same key.
    for (int i = 0; i < 256; i++) send(8'(i), 8'b01010101);

    // Random characters and keys, with random idle cycles in between.
    for (int t = 0; t < 3000; t++) begin
      send(8'($urandom), 8'($urandom));
      idle($urandom_range(0, 2));
    end

    idle(4);
    checks++;
    if (jobs.size() != 0) begin
      failures++;
      $display("FAIL %0d results never appeared", jobs.size());
    end
    $display("outputs=%0d first-pass C>D=%0d C=D=%0d C<D (corrected)=%0d",
             n_out, n_gt, n_eq, n_corr);
    if (n_gt == 0 || n_eq == 0 || n_corr == 0) begin
      failures++;
      $display("FAIL a divider case never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
