// ripple_adder: W-bit ripple-carry adder, a chain of majority-gate full adders.
//
// sum = a + b + cin, cout is the carry out of the top bit. In the decryption
// block it is the 8-bit adder that forms z = q*k + r. The ripple structure is
// this design's choice: only the adder's width is given. Combinational; the
// carry passes through W full adders.
module ripple_adder #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  logic [W:0] c;
  assign c[0] = cin;

  for (genvar i = 0; i < W; i++) begin : g_bit
    full_adder u_fa (.a(a[i]), .b(b[i]), .cin(c[i]), .sum(sum[i]), .cout(c[i+1]));
  end

  assign cout = c[W];

endmodule
