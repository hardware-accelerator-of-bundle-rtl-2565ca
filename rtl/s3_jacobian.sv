// s3_jacobian: the Jacobian update (JU) of one observation: the 2 x 9 block
// of partial derivatives of the projected position (U, V) with respect to
// the 3D point [X Y Z], the rotation (Lie-algebra coordinates w1..w3) and the
// translation t1..t3, column order as in Eq. 3.8.
//
// With iz = 1/z*, a = x*/z*, b = y*/z*, c = x*/z*^2, d = y*/z*^2:
//   point columns (Eq. 3.12):  dU/dPj = R(0,j)*iz - R(2,j)*c
//                              dV/dPj = R(1,j)*iz - R(2,j)*d
//   rotation columns:          dU/dw = [ -a*b,     1 + a*a,  -b ]
//                              dV/dw = [ -(1+b*b), a*b,      a  ]
//   translation columns:       dU/dt = [ iz, 0,  -c ]
//                              dV/dt = [ 0,  iz, -d ]
// The rotation and translation columns are the chain-rule product of the
// 3x6 derivative of the transformed point [I | -(Rp+t)^] with the 2x3
// derivative of the normalization [[1/z, 0, -x/z^2], [0, 1/z, -y/z^2]].
// The original design documents that product with "-x*y/z^2" and "-x/z" in the V
// row; this design keeps the signs that the product of its two factors
// gives (+a*b, +a), which is the standard result.
//
// Timing: on the edge that samples in_valid, twelve multipliers form the
// R*iz, R*c and R*d products and the non-product terms are registered; on
// the next edge the subtractions finish and jac is registered. out_valid is
// high in the cycle after (latency 2). Inputs must hold during the first
// cycle only.
module s3_jacobian
  import ba_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  q_t [2:0][2:0] r,
  input  q_t     iz,
  input  q_t     a,
  input  q_t     b,
  input  q_t     c,
  input  q_t     d,
  input  q_t     ab,
  input  q_t     aa,
  input  q_t     bb,
  output logic   out_valid,
  output jac_t   jac
);
  q_t riz [2][3];   // R(0,j)*iz, R(1,j)*iz
  q_t rc  [3];      // R(2,j)*c
  q_t rd  [3];      // R(2,j)*d
  for (genvar j = 0; j < 3; j++) begin : g_mul
    q_mul u_r0 (.clk, .rst_n, .en(in_valid), .a(r[0][j]), .b(iz), .p(riz[0][j]));
    q_mul u_r1 (.clk, .rst_n, .en(in_valid), .a(r[1][j]), .b(iz), .p(riz[1][j]));
    q_mul u_rc (.clk, .rst_n, .en(in_valid), .a(r[2][j]), .b(c),  .p(rc[j]));
    q_mul u_rd (.clk, .rst_n, .en(in_valid), .a(r[2][j]), .b(d),  .p(rd[j]));
  end

  q_t iz_q, a_q, b_q, c_q, d_q, ab_q, aa_q, bb_q;
  logic ph1;

  // Point columns: one subtractor per entry.
  q_t du_dp [3], dv_dp [3];
  for (genvar j = 0; j < 3; j++) begin : g_sub
    q_add u_su (.sub(1'b1), .a(riz[0][j]), .b(rc[j]), .s(du_dp[j]));
    q_add u_sv (.sub(1'b1), .a(riz[1][j]), .b(rd[j]), .s(dv_dp[j]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph1 <= 1'b0;
      out_valid <= 1'b0;
      {iz_q, a_q, b_q, c_q, d_q, ab_q, aa_q, bb_q} <= '0;
      jac <= '0;
    end else begin
      ph1       <= in_valid;
      out_valid <= ph1;
      if (in_valid) {iz_q, a_q, b_q, c_q, d_q, ab_q, aa_q, bb_q} <= {iz, a, b, c, d, ab, aa, bb};
      if (ph1) begin
        for (int j = 0; j < 3; j++) begin
          jac[0][j] <= du_dp[j];
          jac[1][j] <= dv_dp[j];
        end
        jac[0][3] <= q_neg(ab_q);
        jac[0][4] <= q_add(Q_ONE, aa_q);
        jac[0][5] <= q_neg(b_q);
        jac[1][3] <= q_neg(q_add(Q_ONE, bb_q));
        jac[1][4] <= ab_q;
        jac[1][5] <= a_q;
        jac[0][6] <= iz_q;
        jac[0][7] <= '0;
        jac[0][8] <= q_neg(c_q);
        jac[1][6] <= '0;
        jac[1][7] <= iz_q;
        jac[1][8] <= q_neg(d_q);
      end
    end
  end
endmodule
