// vedic_div8: 8-bit by 8-bit Vedic divider with a 2-bit quotient.
//
// Built one level up from vedic_div4 in the same way vedic_div4 is built from
// the 2-by-2 divider. With A = {A2, A1} and B = {B2, B1} split into nibbles,
// the 4-by-4 divider gives Q = A2 / B2 (2 bits) and Rt (4 bits). Then
//   C = {Rt, A1},  D = Q * B1 (4-by-2 multiplier),  R = C - D (8-bit).
// When the 8-bit comparator reports C < D, Q is decremented, D is recomputed
// from the decremented Q, C becomes {B2, A1}, and a second 8-bit subtraction
// gives R; lt selects the final Q and R.
//
// The correction pass is included because the published encryption table
// needs it: for n = 10100110 and key 01010101 the first pass gives C < D, and
// the tabulated q = 01, r = 01010001 is what the corrected pass produces. The
// block diagram of the 8-bit divider shows only the first pass.
//
// With the key 01010101 the result is exact for every dividend. In general it
// equals A / B and A mod B when the true quotient fits in two bits and lies
// within one of the first estimate. Combinational.
module vedic_div8 (
  input  logic [7:0] a,
  input  logic [7:0] b,
  output logic [1:0] q,
  output logic [7:0] r
);

  logic [3:0] a_hi, a_lo, b_hi, b_lo, rt;
  logic [1:0] q_est, q_dec;
  logic [5:0] d1_p, d2_p;
  logic [7:0] c1, d1, r1, c2, d2, r2;
  logic       c_gt, c_eq, c_lt;
  logic       unused_nb1, unused_nb2;

  assign {a_hi, a_lo} = a;
  assign {b_hi, b_lo} = b;

  // First pass.
  vedic_div4 u_div (.a(a_hi), .b(b_hi), .q(q_est), .r(rt));
  assign c1 = {rt, a_lo};
  mult_nx2 #(.W(4)) u_mul1 (.a(b_lo), .b(q_est), .p(d1_p));
  assign d1 = {2'b00, d1_p};
  comparator #(.W(8)) u_cmp (.a(c1), .b(d1), .gt(c_gt), .eq(c_eq), .lt(c_lt));
  subtractor #(.W(8)) u_sub1 (.a(c1), .b(d1), .diff(r1), .no_borrow(unused_nb1));

  // Correction pass, used when C < D.
  decrementer #(.W(2)) u_dec (.a(q_est), .y(q_dec));
  assign c2 = {b_hi, a_lo};
  mult_nx2 #(.W(4)) u_mul2 (.a(b_lo), .b(q_dec), .p(d2_p));
  assign d2 = {2'b00, d2_p};
  subtractor #(.W(8)) u_sub2 (.a(c2), .b(d2), .diff(r2), .no_borrow(unused_nb2));

  always_comb begin
    r = c_lt ? r2    : r1;
    q = c_lt ? q_dec : q_est;
  end

  always_comb begin
    assert ($onehot({c_gt, c_eq, c_lt}))
      else $error("vedic_div8: comparator outputs not one-hot");
  end

endmodule
