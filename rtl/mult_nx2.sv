// mult_nx2: W-bit by 2-bit multiplier, p = a * b.
//
// Two partial products, a & b0 and (a & b1) shifted left by one, are summed
// by a (W+2)-bit ripple-carry adder. With W = 4 it is the "4 bit by 2 bit
// multiplier" of the 8-by-8 divider (B(1) times the quotient estimate); with
// W = 8 it forms q*k in the decryption block. Only the block's name and width
// are given; the shift-and-add array is this design's choice. Combinational.
module mult_nx2 #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] a,
  input  logic [1:0]   b,
  output logic [W+1:0] p
);

  logic [W+1:0] pp0, pp1;
  logic         unused_cout;

  always_comb begin
    pp0 = {2'b00, a & {W{b[0]}}};
    pp1 = {1'b0, a & {W{b[1]}}, 1'b0};
  end

  ripple_adder #(.W(W + 2)) u_add (
    .a    (pp0),
    .b    (pp1),
    .cin  (1'b0),
    .sum  (p),
    .cout (unused_cout)
  );

endmodule
