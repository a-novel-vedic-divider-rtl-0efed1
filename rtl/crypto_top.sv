// crypto_top: divider-based symmetric-key crypto-hardware, encryption and
// decryption blocks wired together.
//
// A character msg_in and key are captured in an input register when in_valid
// is high. The encryption block bit-reverses the character and divides it by
// the key with the Vedic 8-by-8 divider, giving q (2 bits), r (8 bits) and the
// cipher word {r, q}. The decryption block takes that q and r with the same
// key, forms q*k + r and reverses it, recovering the character. Cipher word,
// q, r and the recovered character are captured in an output register.
//
// Timing: out_valid and the outputs follow in_valid by exactly two clock
// cycles; a new character may enter every cycle. The two register stages and
// the active-low asynchronous reset are this design's choices: the datapath
// itself is combinational, as in the original majority-gate circuit.
module crypto_top
  import vedic_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic [MSG_W-1:0]    msg_in,
  input  logic [MSG_W-1:0]    key,
  output logic                out_valid,
  output logic [CIPHER_W-1:0] cipher_out,
  output logic [Q_W-1:0]      q_out,
  output logic [MSG_W-1:0]    r_out,
  output logic [MSG_W-1:0]    msg_out
);

  logic                in_v_q;
  logic [MSG_W-1:0]    msg_q, key_q;
  logic [Q_W-1:0]      enc_q;
  logic [MSG_W-1:0]    enc_r, dec_msg;
  logic [CIPHER_W-1:0] enc_cipher;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_v_q <= 1'b0;
      msg_q  <= '0;
      key_q  <= '0;
    end else begin
      in_v_q <= in_valid;
      if (in_valid) begin
        msg_q <= msg_in;
        key_q <= key;
      end
    end
  end

  encrypt_block u_enc (
    .msg    (msg_q),
    .key    (key_q),
    .q      (enc_q),
    .r      (enc_r),
    .cipher (enc_cipher)
  );

  decrypt_block u_dec (
    .cipher ({enc_r, enc_q}),
    .key    (key_q),
    .msg    (dec_msg)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid  <= 1'b0;
      cipher_out <= '0;
      q_out      <= '0;
      r_out      <= '0;
      msg_out    <= '0;
    end else begin
      out_valid <= in_v_q;
      if (in_v_q) begin
        cipher_out <= enc_cipher;
        q_out      <= enc_q;
        r_out      <= enc_r;
        msg_out    <= dec_msg;
      end
    end
  end

endmodule
