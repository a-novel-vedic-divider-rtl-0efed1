// tb_half_adder: exhaustive check of the majority-gate half adder against
// a + b.
module tb_half_adder;
  logic a, b, sum, carry;
  int checks = 0, failures = 0;

  half_adder dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      checks++;
      if ({carry, sum} !== 2'(int'(a) + int'(b))) begin
        failures++;
        $display("FAIL a=%b b=%b -> %b%b", a, b, carry, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
