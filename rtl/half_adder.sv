// half_adder: modified half adder of the 2-bit multiplier.
//
// carry = M(a, b, 0) = ab; sum = M(M(a, b, 1), ~carry, 0) = (a + b) & ~(ab),
// i.e. three majority gates and one inverter. Purely combinational.
module half_adder
  import vedic_pkg::*;
(
  input  logic a,
  input  logic b,
  output logic sum,
  output logic carry
);

  always_comb begin
    carry = maj3(a, b, 1'b0);
    sum   = maj3(maj3(a, b, 1'b1), ~carry, 1'b0);
  end

endmodule
