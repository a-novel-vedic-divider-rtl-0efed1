// tb_full_adder: exhaustive check of the majority-gate full adder against
// a + b + cin computed with integer addition.
module tb_full_adder;
  logic a, b, cin, sum, cout;
  int checks = 0, failures = 0;

  full_adder dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      int exp_v;
      {a, b, cin} = 3'(v);
      #1;
      exp_v = int'(a) + int'(b) + int'(cin);
      checks++;
      if ({cout, sum} !== 2'(exp_v)) begin
        failures++;
        $display("FAIL a=%b b=%b cin=%b -> %b%b", a, b, cin, cout, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
