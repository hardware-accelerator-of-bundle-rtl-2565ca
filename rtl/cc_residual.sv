// cc_residual: the cost-function calculation (CC) of one observation: the
// reprojection residual r = a - b of Eq. 3.2, the measured image position
// minus the position predicted by the current estimate,
//   r_u = u_obs - x*/z*,  r_v = v_obs - y*/z*,
// in normalized camera coordinates (the predicted position is the a, b pair
// of the preS3 stage). The residuals go to the host, which forms the
// least-squares cost and the RMS error from them.
//
// Timing: one cycle. The inputs are sampled on the edge that sees in_valid;
// r and out_valid are registered there, and r holds until the next
// in_valid.
module cc_residual
  import ba_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  q_t   u_obs,
  input  q_t   v_obs,
  input  q_t   u_pred,
  input  q_t   v_pred,
  output logic out_valid,
  output q_t [1:0] r
);
  q_t ru, rv;
  q_add u_su (.sub(1'b1), .a(u_obs), .b(u_pred), .s(ru));
  q_add u_sv (.sub(1'b1), .a(v_obs), .b(v_pred), .s(rv));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      r         <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) r <= {rv, ru};
    end
  end
endmodule
