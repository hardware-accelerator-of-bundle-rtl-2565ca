// ba_accel_top: the bundle-adjustment Jacobian-update (JU) and cost-function
// calculation (CC) accelerator with its input memory, S1-IR.
//
// A host writes a problem into S1-IR (observations, 3D points, camera poses,
// all Q4.16), sets num_obs and pulses start. For each observation the
// controller runs the stages in order:
//   s1_transform  x*, y*, z* = R P + t
//   newton_recip  Szrs: 1/z* by 8 Newton-Raphson steps (19 cycles)
//   pre_s3        preS3: x*/z*, y*/z*, x*/z*^2, y*/z*^2 and products
//   s3_jacobian   the 2 x 9 Jacobian block, columns [X Y Z w1 w2 w3 t1 t2 t3]
//   cc_residual   the residual (u_obs - x*/z*, v_obs - y*/z*)
// and presents the result on out_jac / out_res with out_valid high for one
// cycle, tagged with out_idx. One observation takes 32 cycles, so one pass
// over the default 2930 observations takes 93,760 cycles plus 1 to finish;
// done pulses at the end. The host then updates the estimates, rewrites
// S1-IR and starts the next iteration.
//
// Parameters are the default test set of the original design: 1465 points, two
// cameras, 2930 observations. Image positions are in normalized camera
// coordinates (intrinsics K not applied), as the derivation leaves K out.
module ba_accel_top
  import ba_pkg::*;
#(
  parameter int unsigned N_OBS    = 2930,
  parameter int unsigned N_POINTS = 1465,
  parameter int unsigned N_CAMS   = 2,
  parameter int unsigned ITERS    = 8,
  localparam int unsigned OAW = $clog2(N_OBS),
  localparam int unsigned PAW = (N_POINTS > 1) ? $clog2(N_POINTS) : 1,
  localparam int unsigned CAW = (N_CAMS > 1) ? $clog2(N_CAMS) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  // S1-IR loading
  input  logic           obs_we,
  input  logic [OAW-1:0] obs_waddr,
  input  logic [CAW-1:0] obs_wcam,
  input  logic [PAW-1:0] obs_wpoint,
  input  q_t             obs_wu,
  input  q_t             obs_wv,
  input  logic           pt_we,
  input  logic [PAW-1:0] pt_waddr,
  input  point_t         pt_wdata,
  input  logic           cam_we,
  input  logic [CAW-1:0] cam_waddr,
  input  cam_t           cam_wdata,
  // run control
  input  logic           start,
  input  logic [OAW:0]   num_obs,
  output logic           busy,
  output logic           done,
  // results
  output logic           out_valid,
  output logic [OAW-1:0] out_idx,
  output jac_t           out_jac,
  output q_t [1:0]       out_res
);
  logic           rd_en, ir_valid, s1_go, s1_valid, div_start, div_done, div_busy;
  logic           pre_go, pre_valid, s3_go, s3_valid, cc_valid;
  logic [OAW-1:0] rd_addr;
  cam_t           cam;
  point_t         point;
  q_t             u_obs, v_obs, xs, ys, zs, iz;
  q_t             a, b, c, d, ab, aa, bb;

  ba_controller #(.N_OBS(N_OBS)) u_ctrl (
    .clk, .rst_n, .start, .num_obs,
    .rd_en, .rd_addr, .ir_valid,
    .s1_go, .s1_valid,
    .div_start, .div_done,
    .pre_go, .pre_valid,
    .s3_go, .s3_valid,
    .out_valid, .out_idx, .busy, .done
  );

  s1_ir #(.N_OBS(N_OBS), .N_POINTS(N_POINTS), .N_CAMS(N_CAMS)) u_ir (
    .clk, .rst_n,
    .obs_we, .obs_waddr, .obs_wcam, .obs_wpoint, .obs_wu, .obs_wv,
    .pt_we, .pt_waddr, .pt_wdata,
    .cam_we, .cam_waddr, .cam_wdata,
    .rd_en, .rd_addr,
    .out_valid(ir_valid), .cam, .point, .u_obs, .v_obs
  );

  s1_transform u_s1 (
    .clk, .rst_n, .in_valid(s1_go), .cam, .point,
    .out_valid(s1_valid), .xs, .ys, .zs
  );

  newton_recip #(.ITERS(ITERS)) u_szrs (
    .clk, .rst_n, .start(div_start), .x(zs),
    .busy(div_busy), .done(div_done), .q(iz)
  );

  pre_s3 u_pre (
    .clk, .rst_n, .in_valid(pre_go), .xs, .ys, .iz,
    .out_valid(pre_valid), .a, .b, .c, .d, .ab, .aa, .bb
  );

  s3_jacobian u_s3 (
    .clk, .rst_n, .in_valid(s3_go), .r(cam.r), .iz,
    .a, .b, .c, .d, .ab, .aa, .bb,
    .out_valid(s3_valid), .jac(out_jac)
  );

  cc_residual u_cc (
    .clk, .rst_n, .in_valid(s3_go),
    .u_obs, .v_obs, .u_pred(a), .v_pred(b),
    .out_valid(cc_valid), .r(out_res)
  );

  // The divider is only started while idle, and the residual is ready
  // before the Jacobian block it is reported with.
  a_div_idle: assert property (@(posedge clk) disable iff (!rst_n) div_start |-> !div_busy);
  a_cc_first: assert property (@(posedge clk) disable iff (!rst_n) s3_valid |-> !cc_valid);
endmodule
