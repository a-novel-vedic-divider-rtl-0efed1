// tb_encrypt_block: encrypts "Wiley" with key 01010101 and compares each
// 10-bit cipher word with the published table, then checks every character
// against n = q*k + r with r < k, using bit-reversal and integer division.
module tb_encrypt_block;
  import vedic_ref_pkg::*;
  logic [7:0] msg, key, r;
  logic [1:0] q;
  logic [9:0] cipher;
  int checks = 0, failures = 0;

  encrypt_block dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static logic [7:0] txt [5] = '{"W", "i", "l", "e", "y"};
    static logic [9:0] exp_y [5] = '{10'b0100000010, 10'b0100000101, 10'b0011011000,
                              10'b0101000101, 10'b0100100101};
    logic [49:0] stream, exp_stream;
    exp_stream = 50'b01000000100100000101001101100001010001010100100101;
    key = 8'b01010101;
    for (int k = 0; k < 5; k++) begin
      msg = txt[k];
      #1;
      stream = {stream[39:0], cipher};
      checks++;
      if (cipher !== exp_y[k]) begin
        failures++;
        $display("FAIL '%c' -> %b expected %b", txt[k], cipher, exp_y[k]);
      end
    end
    checks++;
    if (stream !== exp_stream) begin
      failures++;
      $display("FAIL stream %b", stream);
    end
    for (int i = 0; i < 256; i++) begin
      int n;
      msg = 8'(i);
      #1;
      n = int'(rev8(8'(i)));
      checks++;
      if (q !== 2'(n / 85) || r !== 8'(n % 85) || cipher !== {r, q}) begin
        failures++;
        $display("FAIL x=%0d -> q=%0d r=%0d", i, q, r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
