// comparator: W-bit magnitude comparator giving a>b, a==b and a<b.
//
// The operands are cut into 2-bit slices. A T1 cell compares one slice with
// four majority gates: X = M(a1, ~b1, a0), Y = M(a1, ~b1, ~b0), then
// gt = M(X, Y, 0) (a>b) and ge = M(X, Y, 1) (a>=b). T4 cells merge slices from
// the most significant one down: gt = M(gt_hi, ge_hi, gt_lo) and
// ge = M(gt_hi, ge_hi, ge_lo). A C2 gate gives eq = M(ge, ~gt, 0). W must be
// even: 4 for the 4-by-4 divider, 8 for the 8-by-8 divider. Combinational.
module comparator
  import vedic_pkg::*;
#(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic         gt,
  output logic         eq,
  output logic         lt
);

  localparam int unsigned NS = W / 2;   // number of 2-bit slices

  // Per-slice T1 results, and the running merge from the top slice down.
  logic [NS-1:0] s_gt, s_ge;
  logic [NS-1:0] m_gt, m_ge;

  always_comb begin
    for (int s = 0; s < NS; s++) begin
      logic x, y;
      x = maj3(a[2*s+1], ~b[2*s+1], a[2*s]);
      y = maj3(a[2*s+1], ~b[2*s+1], ~b[2*s]);
      s_gt[s] = maj3(x, y, 1'b0);
      s_ge[s] = maj3(x, y, 1'b1);
    end
    m_gt[NS-1] = s_gt[NS-1];
    m_ge[NS-1] = s_ge[NS-1];
    for (int s = NS - 2; s >= 0; s--) begin
      m_gt[s] = maj3(m_gt[s+1], m_ge[s+1], s_gt[s]);
      m_ge[s] = maj3(m_gt[s+1], m_ge[s+1], s_ge[s]);
    end
    gt = m_gt[0];
    eq = maj3(m_ge[0], ~m_gt[0], 1'b0);
    lt = ~m_ge[0];
  end

  initial begin
    assert (W % 2 == 0 && W >= 2) else $error("comparator: W must be even");
  end

endmodule
