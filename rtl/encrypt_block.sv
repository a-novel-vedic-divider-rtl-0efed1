// encrypt_block: encryption half of the divider-based symmetric cipher.
//
// A plaintext character x is bit-reversed to n, and n is divided by the key k
// with the 8-by-8 Vedic divider: n = q*k + r. The cipher word is the 8-bit
// remainder followed by the 2-bit quotient, cipher = {r, q}, so each 8-bit
// character becomes 10 cipher bits. Example (key 01010101): 'W' = 01010111,
// n = 11101010, q = 10, r = 01000000, cipher = 0100000010.
// Decryption is exact when the divider's result is, which holds for every
// character with the key 01010101. Combinational.
module encrypt_block
  import vedic_pkg::*;
(
  input  logic [MSG_W-1:0]    msg,
  input  logic [MSG_W-1:0]    key,
  output logic [Q_W-1:0]      q,
  output logic [MSG_W-1:0]    r,
  output logic [CIPHER_W-1:0] cipher
);

  logic [MSG_W-1:0] n;

  assign n = reverse_bits(msg);

  vedic_div8 u_div (.a(n), .b(key), .q(q), .r(r));

  assign cipher = {r, q};

endmodule
