// vedic_ref_pkg: integer reference model of the Vedic division algorithm,
// for testbenches. It is written from the algorithm's steps with ordinary
// arithmetic (/, %, *, -), not from the gate-level structure:
//   Q = A2 / B2, Rt = A2 % B2 (2-by-2 level: plain division, 0/0 for B2 = 0),
//   C = Rt * 2^h + A1, D = Q * B1; if C >= D the result is (Q, C - D);
//   otherwise Q' = Q - 1 (mod 4), C' = B2 * 2^h + A1, result (Q', C' - Q' * B1)
//   taken modulo 2^(2h).
package vedic_ref_pkg;

  typedef struct packed {
    logic [1:0] q;
    logic [7:0] r;
    logic       corrected;   // the C < D correction pass was taken
    logic       c_eq_d;      // first-pass C equals D
  } div_res_t;

  function automatic div_res_t ref_div2(int a, int b);
    div_res_t res;
    res = '0;
    if (b != 0) begin
      res.q = 2'(a / b);
      res.r = 8'(a % b);
    end
    return res;
  endfunction

  // One level of the algorithm with half width h; the sub-division is done by
  // the level below.
  function automatic div_res_t ref_level(int a, int b, int h, div_res_t sub);
    div_res_t res;
    int m, a1, b1, b2, c, d, q;
    m  = (1 << h) - 1;
    a1 = a & m;
    b1 = b & m;
    b2 = b >> h;
    q  = int'(sub.q);
    c  = (int'(sub.r) << h) + a1;
    d  = q * b1;
    res = '0;
    res.c_eq_d = (c == d);
    if (c >= d) begin
      res.q = 2'(q);
      res.r = 8'(c - d);
    end else begin
      q = (q + 3) % 4;
      res.q = 2'(q);
      res.r = 8'(((b2 << h) + a1 - q * b1) & ((1 << (2 * h)) - 1));
      res.corrected = 1'b1;
    end
    return res;
  endfunction

  function automatic div_res_t ref_div4(int a, int b);
    return ref_level(a, b, 2, ref_div2(a >> 2, b >> 2));
  endfunction

  function automatic div_res_t ref_div8(int a, int b);
    return ref_level(a, b, 4, ref_div4(a >> 4, b >> 4));
  endfunction

  function automatic logic [7:0] rev8(logic [7:0] x);
    logic [7:0] y;
    for (int i = 0; i < 8; i++) y[i] = x[7-i];
    return y;
  endfunction

endpackage
