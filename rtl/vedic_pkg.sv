// vedic_pkg: constants and the majority function shared by the Vedic divider
// and the crypto-hardware built on it.
//
// Every logic block of this design is drawn as a network of three-input
// majority gates M(a,b,c) = ab + ac + bc and inverters. maj3() gives that gate
// so that the RTL keeps the same gate-level structure: M(a,b,0) is an AND,
// M(a,b,1) is an OR. The widths below are those of the cipher: an 8-bit
// character and key, a 2-bit quotient and an 8-bit remainder, packed into a
// 10-bit cipher word {remainder, quotient}.
package vedic_pkg;

  localparam int unsigned MSG_W    = 8;             // character and key width
  localparam int unsigned Q_W      = 2;             // quotient width of every divider
  localparam int unsigned CIPHER_W = MSG_W + Q_W;   // cipher word {r, q}

  // Three-input majority gate.
  function automatic logic maj3(input logic a, input logic b, input logic c);
    return (a & b) | (a & c) | (b & c);
  endfunction

  // Bit-order reversal of a character (the "reverse message" step).
  function automatic logic [MSG_W-1:0] reverse_bits(input logic [MSG_W-1:0] x);
    logic [MSG_W-1:0] y;
    for (int i = 0; i < MSG_W; i++) y[i] = x[MSG_W-1-i];
    return y;
  endfunction

endpackage
