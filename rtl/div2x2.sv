// div2x2: 2-bit by 2-bit divider, the leaf of the Vedic divider hierarchy.
//
// Minimised sum-of-products equations, realised with majority gates:
//   q1 = a1 b0 ~b1
//   q0 = a0 b0 ~b1 + a1 b1 (a0 + ~b0)
//   r1 = a1 ~a0 b1 b0
//   r0 = a0 b1 (~a1 + ~b0)
// Division by zero (b = 00) gives q = 00, r = 00. The bracketed terms are ORs
// (majority gates with a 1 input); this is the reading that makes 3/2 = 1 r 1
// and 3/3 = 1 r 0 come out right. Combinational.
module div2x2
  import vedic_pkg::*;
(
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [1:0] q,
  output logic [1:0] r
);

  always_comb begin
    // q1: AND of a1, b0 and ~b1
    q[1] = maj3(maj3(a[1], b[0], 1'b0), ~b[1], 1'b0);
    // q0: OR of (a0 b0 ~b1) and (a1 b1 (a0 + ~b0))
    q[0] = maj3(maj3(maj3(a[0], b[0], 1'b0), ~b[1], 1'b0),
                maj3(maj3(a[1], b[1], 1'b0), maj3(~b[0], a[0], 1'b1), 1'b0),
                1'b1);
    // r1: AND of (a1 b0) and (~a0 b1)
    r[1] = maj3(maj3(a[1], b[0], 1'b0), maj3(~a[0], b[1], 1'b0), 1'b0);
    // r0: AND of (a0 b1) and (~a1 + ~b0)
    r[0] = maj3(maj3(a[0], b[1], 1'b0), maj3(~a[1], ~b[0], 1'b1), 1'b0);
  end

endmodule
