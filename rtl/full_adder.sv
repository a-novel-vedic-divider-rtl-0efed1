// full_adder: one-bit modified full adder made of three majority gates and
// two inverters.
//
// carry = M(a, b, cin); sum = M(~carry, cin, M(a, b, ~cin)). The middle gate
// gives a+b when cin=0 and ab when cin=1, and the output gate then resolves the
// parity with the inverted carry. This gate arrangement follows the published
// majority-logic full adder the divider is built from. Purely combinational.
module full_adder
  import vedic_pkg::*;
(
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);

  logic ab_sel;

  always_comb begin
    cout   = maj3(a, b, cin);
    ab_sel = maj3(a, b, ~cin);
    sum    = maj3(~cout, cin, ab_sel);
  end

endmodule
