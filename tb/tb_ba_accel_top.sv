// tb_ba_accel_top: end-to-end test of the accelerator at its default size:
// 1465 3D points seen by 2 cameras, 2930 observations, the two-image set the
// design is sized for. The testbench generates the problem itself (random
// points in front of both cameras, poses from small random rotations and
// translations, measured positions = true projections plus noise), loads it
// into S1-IR through the write ports, and runs two iterations: after the
// first pass it changes both camera poses and part of the points, as the
// host would after an update, and runs again.
//
// Every result is compared with a double-precision reference computed from
// the same Q4.16 inputs: the 2 x 9 Jacobian block (tolerance 2^-11) and the
// residual (tolerance 2^-12). Also checked: each observation reported once,
// in order; 32 cycles between observations; start-to-done time
// 32 * num_obs + 1 cycles. Mechanisms counted, each of which must occur:
// divider operations, camera changes between consecutive observations,
// memory rewrites between iterations, starts ignored while busy.
module tb_ba_accel_top;
  import ba_pkg::*;
  localparam int NO = 2930, NP = 1465, NC = 2;
  localparam int OAW = $clog2(NO), PAW = $clog2(NP), CAW = 1;

  logic clk = 0, rst_n = 0;
  logic obs_we = 0, pt_we = 0, cam_we = 0, start = 0;
  logic [OAW-1:0] obs_waddr = 0;
  logic [CAW-1:0] obs_wcam = 0, cam_waddr = 0;
  logic [PAW-1:0] obs_wpoint = 0, pt_waddr = 0;
  q_t obs_wu = 0, obs_wv = 0;
  point_t pt_wdata = '0;
  cam_t cam_wdata = '0;
  logic [OAW:0] num_obs = 0;
  logic busy, done, out_valid;
  logic [OAW-1:0] out_idx;
  jac_t out_jac;
  q_t [1:0] out_res;

  ba_accel_top dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_div = 0, n_camsw = 0, n_rewrite = 0, n_ignored = 0;
  real max_jerr = 0.0, max_rerr = 0.0;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // problem data, kept as loaded (Q4.16)
  cam_t   cams [NC];
  point_t pts [NP];
  int     o_cam [NO], o_pt [NO];
  q_t     o_u [NO], o_v [NO];

  function automatic real fabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction
  function automatic real rq(q_t v);
    return real'(v) / 65536.0;
  endfunction
  function automatic q_t qr(real v);
    return q_t'(int'($floor(v * 65536.0 + 0.5)));
  endfunction
  function automatic real urand(real lo, real hi);
    return lo + (hi - lo) * real'($urandom_range(0, 1000000)) / 1.0e6;
  endfunction

  // Rotation from three small angles, R = Rz * Ry * Rx.
  function automatic cam_t make_cam(real ax, real ay, real az, real tx, real ty, real tz);
    cam_t c;
    real cx, sx, cy, sy, cz, sz;
    cx = $cos(ax); sx = $sin(ax); cy = $cos(ay); sy = $sin(ay); cz = $cos(az); sz = $sin(az);
    c.r[0][0] = qr(cz*cy); c.r[0][1] = qr(cz*sy*sx - sz*cx); c.r[0][2] = qr(cz*sy*cx + sz*sx);
    c.r[1][0] = qr(sz*cy); c.r[1][1] = qr(sz*sy*sx + cz*cx); c.r[1][2] = qr(sz*sy*cx - cz*sx);
    c.r[2][0] = qr(-sy);   c.r[2][1] = qr(cy*sx);            c.r[2][2] = qr(cy*cx);
    c.t[0] = qr(tx); c.t[1] = qr(ty); c.t[2] = qr(tz);
    return c;
  endfunction

  function automatic void cam_point(int o, output real ps [3]);
    for (int i = 0; i < 3; i++)
      ps[i] = rq(cams[o_cam[o]].r[i][0]) * rq(pts[o_pt[o]].p[0]) +
              rq(cams[o_cam[o]].r[i][1]) * rq(pts[o_pt[o]].p[1]) +
              rq(cams[o_cam[o]].r[i][2]) * rq(pts[o_pt[o]].p[2]) + rq(cams[o_cam[o]].t[i]);
  endfunction

  task automatic load_cams();
    for (int i = 0; i < NC; i++) begin
      cams[i] = make_cam(urand(-0.2, 0.2), urand(-0.2, 0.2), urand(-0.2, 0.2),
                         urand(-0.3, 0.3), urand(-0.3, 0.3), urand(-0.3, 0.3));
      @(negedge clk); cam_we = 1; cam_waddr = CAW'(i); cam_wdata = cams[i];
    end
    @(negedge clk); cam_we = 0;
  endtask

  task automatic load_points(int first, int last);
    for (int i = first; i <= last; i++) begin
      pts[i].p[0] = qr(urand(-1.5, 1.5)); pts[i].p[1] = qr(urand(-1.5, 1.5));
      pts[i].p[2] = qr(urand(2.5, 5.0));
      @(negedge clk); pt_we = 1; pt_waddr = PAW'(i); pt_wdata = pts[i];
    end
    @(negedge clk); pt_we = 0;
  endtask

  // Measured positions: true projection plus noise of up to 0.02.
  task automatic load_obs();
    for (int o = 0; o < NO; o++) begin
      real ps [3];
      o_cam[o] = o / NP; o_pt[o] = o % NP;
      cam_point(o, ps);
      o_u[o] = qr(ps[0] / ps[2] + urand(-0.02, 0.02));
      o_v[o] = qr(ps[1] / ps[2] + urand(-0.02, 0.02));
      @(negedge clk);
      obs_we = 1; obs_waddr = OAW'(o); obs_wcam = CAW'(o_cam[o]); obs_wpoint = PAW'(o_pt[o]);
      obs_wu = o_u[o]; obs_wv = o_v[o];
    end
    @(negedge clk); obs_we = 0;
  endtask

  // Check one reported observation.
  task automatic check_out(int o);
    real ps [3], x, y, z, w [2][9], rr [3][3];
    cam_point(o, ps);
    x = ps[0]; y = ps[1]; z = ps[2];
    for (int i = 0; i < 3; i++) for (int j = 0; j < 3; j++) rr[i][j] = rq(cams[o_cam[o]].r[i][j]);
    for (int j = 0; j < 3; j++) begin
      w[0][j] = rr[0][j] / z - rr[2][j] * x / (z*z);
      w[1][j] = rr[1][j] / z - rr[2][j] * y / (z*z);
    end
    w[0][3] = -x*y/(z*z);       w[0][4] = 1.0 + x*x/(z*z); w[0][5] = -y/z;
    w[1][3] = -(1.0 + y*y/(z*z)); w[1][4] = x*y/(z*z);     w[1][5] = x/z;
    w[0][6] = 1.0/z; w[0][7] = 0.0;   w[0][8] = -x/(z*z);
    w[1][6] = 0.0;   w[1][7] = 1.0/z; w[1][8] = -y/(z*z);
    for (int r = 0; r < 2; r++)
      for (int c = 0; c < 9; c++) begin
        real e;
        e = fabs(rq(out_jac[r][c]) - w[r][c]);
        if (e > max_jerr) max_jerr = e;
        checks++;
        if (e > 1.0/2048) begin
          failures++;
          if (failures < 20) $display("FAIL obs %0d J[%0d][%0d] got %f want %f", o, r, c, rq(out_jac[r][c]), w[r][c]);
        end
      end
    begin
      real e0, e1;
      e0 = fabs(rq(out_res[0]) - (rq(o_u[o]) - x/z));
      e1 = fabs(rq(out_res[1]) - (rq(o_v[o]) - y/z));
      if (e0 > max_rerr) max_rerr = e0;
      if (e1 > max_rerr) max_rerr = e1;
      checks++;
      if (e0 > 1.0/4096 || e1 > 1.0/4096) begin
        failures++;
        if (failures < 20) $display("FAIL obs %0d residual got %f %f", o, rq(out_res[0]), rq(out_res[1]));
      end
    end
  endtask

  always @(posedge clk) if (dut.div_start) n_div++;

  task automatic run_pass(int n);
    int t0, t_done, seen, last_t, t, prev_cam;
    num_obs = (OAW+1)'(n);
    seen = 0; t = 0; last_t = 0; prev_cam = -1;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    t0 = 0; t = 1;
    while (!done) begin
      if (t == 500) begin
        start = 1;                 // ignored: a pass is running
        @(negedge clk); start = 0; t++;
        if (busy && seen < n) n_ignored++;
        continue;
      end
      if (out_valid) begin
        checks++;
        if (int'(out_idx) != seen) begin failures++; $display("FAIL out_idx %0d want %0d", out_idx, seen); end
        if (seen > 0) begin
          checks++;
          if (t - last_t != 32) begin failures++; $display("FAIL period %0d", t - last_t); end
        end
        if (prev_cam >= 0 && o_cam[seen] != prev_cam) n_camsw++;
        prev_cam = o_cam[seen];
        check_out(seen);
        last_t = t;
        seen++;
      end
      @(negedge clk); t++;
    end
    t_done = t;
    checks++;
    if (seen != n) begin failures++; $display("FAIL %0d of %0d observations reported", seen, n); end
    checks++;
    if (t_done - t0 != 32 * n + 1) begin
      failures++;
      $display("FAIL pass took %0d cycles, want %0d", t_done - t0, 32 * n + 1);
    end
    $display("pass of %0d observations: %0d cycles", n, t_done - t0);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    load_cams();
    load_points(0, NP - 1);
    load_obs();
    run_pass(NO);
    // next iteration: new poses, part of the points moved, observations kept
    load_cams();
    load_points(0, NP / 3);
    n_rewrite++;
    run_pass(NO);
    checks += 4;
    if (n_div != 2 * NO) begin failures++; $display("FAIL %0d divider operations", n_div); end
    if (n_camsw == 0)    begin failures++; $display("FAIL no camera change seen"); end
    if (n_rewrite == 0)  begin failures++; $display("FAIL no rewrite between iterations"); end
    if (n_ignored == 0)  begin failures++; $display("FAIL no start while busy"); end
    $display("divider ops %0d, camera changes %0d, rewrites %0d, ignored starts %0d",
             n_div, n_camsw, n_rewrite, n_ignored);
    $display("max |J error| %e, max |r error| %e", max_jerr, max_rerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
