// subtractor: W-bit two's-complement subtractor, diff = a - b (mod 2^W).
//
// Each bit of b is inverted and added to a through a chain of modified full
// adders whose first carry-in is 1, as in the block diagram of the 4-bit
// subtractor. no_borrow is the final carry: 1 when a >= b. Used 4 bits wide in
// the 4-by-4 divider, 8 bits wide in the 8-by-8 divider and 2 bits wide in the
// decrementer. Combinational.
module subtractor #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] diff,
  output logic         no_borrow
);

  logic [W:0] c;
  assign c[0] = 1'b1;

  for (genvar i = 0; i < W; i++) begin : g_bit
    full_adder u_fa (.a(a[i]), .b(~b[i]), .cin(c[i]), .sum(diff[i]), .cout(c[i+1]));
  end

  assign no_borrow = c[W];

endmodule
