// decrypt_block: decryption half of the divider-based symmetric cipher.
//
// The cipher word is split into r (bits 9:2) and q (bits 1:0). An 8-by-2
// multiplier forms q*k and an 8-bit ripple adder adds r, giving z = q*k + r,
// which equals the bit-reversed character n; reversing z's bits gives the
// plaintext back. Only the low 8 bits of q*k + r are kept. The 8-by-2
// multiplier is this design's choice for the product of the 2-bit quotient
// and the 8-bit key. Combinational.
module decrypt_block
  import vedic_pkg::*;
(
  input  logic [CIPHER_W-1:0] cipher,
  input  logic [MSG_W-1:0]    key,
  output logic [MSG_W-1:0]    msg
);

  logic [Q_W-1:0]   q;
  logic [MSG_W-1:0] r, z;
  logic [MSG_W+1:0] qk;
  logic [1:0]       unused_qk_hi;
  logic             unused_cout;

  assign {r, q} = cipher;

  mult_nx2 #(.W(MSG_W)) u_mul (.a(key), .b(q), .p(qk));
  assign unused_qk_hi = qk[MSG_W+1:MSG_W];

  ripple_adder #(.W(MSG_W)) u_add (
    .a    (qk[MSG_W-1:0]),
    .b    (r),
    .cin  (1'b0),
    .sum  (z),
    .cout (unused_cout)
  );

  assign msg = reverse_bits(z);

endmodule
