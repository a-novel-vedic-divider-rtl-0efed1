// tb_decrypt_block: decrypts the published "Wiley" cipher words with key
// 01010101, then checks z = q*k + r reversed for every cipher word and a set
// of keys, using integer arithmetic.
module tb_decrypt_block;
  import vedic_ref_pkg::*;
  logic [9:0] cipher;
  logic [7:0] key, msg;
  int checks = 0, failures = 0;

  decrypt_block dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static logic [7:0] txt [5] = '{"W", "i", "l", "e", "y"};
    static logic [9:0] ys [5] = '{10'b0100000010, 10'b0100000101, 10'b0011011000,
                           10'b0101000101, 10'b0100100101};
    key = 8'b01010101;
    for (int k = 0; k < 5; k++) begin
      cipher = ys[k];
      #1;
      checks++;
      if (msg !== txt[k]) begin
        failures++;
        $display("FAIL %b -> '%c' expected '%c'", ys[k], msg, txt[k]);
      end
    end
    for (int t = 0; t < 8; t++) begin
      key = (t == 0) ? 8'b01010101 : 8'($urandom);
      for (int c = 0; c < 1024; c++) begin
        int z;
        cipher = 10'(c);
        #1;
        z = ((c & 3) * int'(key) + (c >> 2)) & 255;
        checks++;
        if (msg !== rev8(8'(z))) begin
          failures++;
          if (failures < 10) $display("FAIL key=%0d cipher=%0d -> %0d", key, c, msg);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
