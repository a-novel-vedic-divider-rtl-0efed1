// mult2x2: 2-bit by 2-bit array multiplier, p = a * b.
//
// The four partial products a_i b_j are AND gates (majority gates with a 0
// input). p0 = a0 b0; a half adder adds a1 b0 and a0 b1 into p1 and a carry; a
// second half adder adds a1 b1 and that carry into p2 and p3. Combinational.
module mult2x2
  import vedic_pkg::*;
(
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] p
);

  logic pp00, pp10, pp01, pp11, c1;

  always_comb begin
    pp00 = maj3(a[0], b[0], 1'b0);
    pp10 = maj3(a[1], b[0], 1'b0);
    pp01 = maj3(a[0], b[1], 1'b0);
    pp11 = maj3(a[1], b[1], 1'b0);
  end

  assign p[0] = pp00;
  half_adder u_ha1 (.a(pp10), .b(pp01), .sum(p[1]), .carry(c1));
  half_adder u_ha2 (.a(pp11), .b(c1),   .sum(p[2]), .carry(p[3]));

endmodule
