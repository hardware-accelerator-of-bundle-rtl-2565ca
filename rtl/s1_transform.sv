// s1_transform: first stage of the Jacobian pipeline. It moves a 3D point
// into the camera frame, X* = R P + t (Eq. 3.10 of the underlying
// derivation; the camera intrinsics K do not enter the derivatives and are
// left out, so image positions are in normalized camera coordinates).
// X*, Y* and Z* are computed at the same time, as the original design asks.
//
// Nine Q4.16 multipliers form all R(i,j)*P(j) products on the edge that
// samples in_valid; on the next edge three adder trees add each row and its
// t(i). out_valid is high in the cycle after that (latency 2). Outputs hold
// until the next in_valid.
module s1_transform
  import ba_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  cam_t   cam,
  input  point_t point,
  output logic   out_valid,
  output q_t     xs,
  output q_t     ys,
  output q_t     zs
);
  q_t prod [3][3];
  q_t t_q  [3];
  logic ph1;

  for (genvar i = 0; i < 3; i++) begin : g_row
    for (genvar j = 0; j < 3; j++) begin : g_col
      q_mul u_mul (.clk, .rst_n, .en(in_valid), .a(cam.r[i][j]), .b(point.p[j]), .p(prod[i][j]));
    end
  end

  // Adder tree per row: (p0 + p1) + (p2 + t)
  q_t s01 [3], s2t [3], srow [3];
  for (genvar i = 0; i < 3; i++) begin : g_sum
    q_add u_a0 (.sub(1'b0), .a(prod[i][0]), .b(prod[i][1]), .s(s01[i]));
    q_add u_a1 (.sub(1'b0), .a(prod[i][2]), .b(t_q[i]),     .s(s2t[i]));
    q_add u_a2 (.sub(1'b0), .a(s01[i]),     .b(s2t[i]),     .s(srow[i]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph1       <= 1'b0;
      out_valid <= 1'b0;
      t_q       <= '{default: '0};
      xs        <= '0;
      ys        <= '0;
      zs        <= '0;
    end else begin
      ph1       <= in_valid;
      out_valid <= ph1;
      if (in_valid) for (int i = 0; i < 3; i++) t_q[i] <= cam.t[i];
      if (ph1) begin
        xs <= srow[0];
        ys <= srow[1];
        zs <= srow[2];
      end
    end
  end
endmodule
