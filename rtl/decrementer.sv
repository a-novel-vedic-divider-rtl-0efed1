// decrementer: y = a - 1 (mod 2^W), the "decremented block" that lowers the
// quotient estimate by one when the first remainder comes out negative.
//
// Built, as described, from a W-bit subtractor with the constant 1 as
// subtrahend; 00 wraps to 11. Combinational.
module decrementer #(
  parameter int unsigned W = 2
) (
  input  logic [W-1:0] a,
  output logic [W-1:0] y
);

  logic unused_nb;

  subtractor #(.W(W)) u_sub (
    .a         (a),
    .b         (W'(1)),
    .diff      (y),
    .no_borrow (unused_nb)
  );

endmodule
