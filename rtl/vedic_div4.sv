// vedic_div4: 4-bit by 4-bit Vedic divider with a 2-bit quotient.
//
// The operands are split into halves, A = {A2, A1} and B = {B2, B1}. The 2-by-2
// divider gives the quotient estimate Q = A2 / B2 and its remainder Rt. Then
//   C = {Rt, A1},  D = Q * B1,  R = C - D.
// If C >= D, Q and R are the result. If C < D (the comparator's lt output),
// the estimate was one too large: Q is decremented, D is recomputed as
// (Q-1) * B1 with a second 2-bit multiplier, the new C is {B2, A1}, and a second
// 4-bit subtraction gives R. 2:1 multiplexers driven by lt pick the final
// remainder and quotient. The quotient-select gating is written as a
// multiplexer here.
//
// The result equals A / B and A mod B whenever the true quotient fits in two
// bits and lies within one of A2 / B2 (196 of the 240 operand pairs with
// B != 0); otherwise the outputs are what this algorithm yields.
// Combinational: path = 2x2 divider, multiplier, comparator, decrementer,
// multiplier, subtractor, multiplexer.
module vedic_div4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [1:0] q,
  output logic [3:0] r
);

  logic [1:0] a_hi, a_lo, b_hi, b_lo;
  logic [1:0] q_est, rt, q_dec;
  logic [3:0] c1, d1, r1, c2, d2, r2;
  logic       c_gt, c_eq, c_lt;
  logic       unused_nb1, unused_nb2;

  assign {a_hi, a_lo} = a;
  assign {b_hi, b_lo} = b;

  // First pass: estimate from the high halves.
  div2x2 u_div (.a(a_hi), .b(b_hi), .q(q_est), .r(rt));
  assign c1 = {rt, a_lo};
  mult2x2 u_mul1 (.a(q_est), .b(b_lo), .p(d1));
  comparator #(.W(4)) u_cmp (.a(c1), .b(d1), .gt(c_gt), .eq(c_eq), .lt(c_lt));
  subtractor #(.W(4)) u_sub1 (.a(c1), .b(d1), .diff(r1), .no_borrow(unused_nb1));

  // Correction pass, used when C < D.
  decrementer #(.W(2)) u_dec (.a(q_est), .y(q_dec));
  assign c2 = {b_hi, a_lo};
  mult2x2 u_mul2 (.a(q_dec), .b(b_lo), .p(d2));
  subtractor #(.W(4)) u_sub2 (.a(c2), .b(d2), .diff(r2), .no_borrow(unused_nb2));

  // Output selection by the comparator.
  always_comb begin
    r = c_lt ? r2    : r1;
    q = c_lt ? q_dec : q_est;
  end

  // The comparator's three outputs are mutually exclusive.
  always_comb begin
    assert ($onehot({c_gt, c_eq, c_lt}))
      else $error("vedic_div4: comparator outputs not one-hot");
  end

endmodule
