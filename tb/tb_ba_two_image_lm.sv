// tb_ba_two_image_lm: the two-image workload the accelerator is sized for,
// run as ten iterations of a real pose refinement. 1465 points are seen by
// two cameras (2930 observations). The measured positions are the true
// projections plus noise of up to 0.001; both camera poses start off by up
// to 0.03 rad and 0.05 in translation. Each iteration the testbench, acting
// as host, loads the current poses, runs one accelerator pass, and from the
// hardware's Jacobian pose columns and residuals forms, per camera,
// (J^T J + mu I) delta = J^T r and updates the pose by
// R <- exp(delta_w^) R, t <- exp(delta_w^) t + delta_t. Points stay fixed
// (motion-only refinement), so no gauge freedom arises.
//
// Checked: every output against a double-precision reference from the same
// Q4.16 inputs; 32 * 2930 + 1 cycles per pass; the RMS of the hardware
// residuals never grows by more than 5 % and ends below 0.002, close to the
// noise level, after 10 iterations; the estimated poses end close to the
// true ones.
module tb_ba_two_image_lm;
  import ba_pkg::*;
  localparam int NO = 2930, NP = 1465, NC = 2, ITER = 10;
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

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef real m3_t [3][3];
  typedef real v3_t [3];

  m3_t    est_r [NC], true_r [NC];
  v3_t    est_t [NC], true_t [NC];
  cam_t   cams [NC];         // loaded, quantized
  point_t pts [NP];
  q_t     o_u [NO], o_v [NO];
  real    h [NC][6][6], g [NC][6];

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

  // Rotation exp(w^) by Rodrigues' formula.
  function automatic m3_t rexp(real w0, real w1, real w2);
    m3_t k, k2, r;
    real th, s1, s2;
    th = $sqrt(w0*w0 + w1*w1 + w2*w2);
    k = '{'{0.0, -w2, w1}, '{w2, 0.0, -w0}, '{-w1, w0, 0.0}};
    for (int i = 0; i < 3; i++) for (int j = 0; j < 3; j++) begin
      k2[i][j] = 0.0;
      for (int m = 0; m < 3; m++) k2[i][j] += k[i][m] * k[m][j];
    end
    if (th < 1.0e-12) begin s1 = 1.0; s2 = 0.5; end
    else begin s1 = $sin(th) / th; s2 = (1.0 - $cos(th)) / (th * th); end
    for (int i = 0; i < 3; i++) for (int j = 0; j < 3; j++)
      r[i][j] = ((i == j) ? 1.0 : 0.0) + s1 * k[i][j] + s2 * k2[i][j];
    return r;
  endfunction

  function automatic m3_t mmul(m3_t a, m3_t b);
    m3_t c;
    for (int i = 0; i < 3; i++) for (int j = 0; j < 3; j++) begin
      c[i][j] = 0.0;
      for (int m = 0; m < 3; m++) c[i][j] += a[i][m] * b[m][j];
    end
    return c;
  endfunction

  // Camera-frame point of observation o from the loaded (quantized) data.
  function automatic void cam_point(int o, output real ps [3]);
    int c, p;
    c = o / NP; p = o % NP;
    for (int i = 0; i < 3; i++)
      ps[i] = rq(cams[c].r[i][0]) * rq(pts[p].p[0]) + rq(cams[c].r[i][1]) * rq(pts[p].p[1]) +
              rq(cams[c].r[i][2]) * rq(pts[p].p[2]) + rq(cams[c].t[i]);
  endfunction

  task automatic load_cams();
    for (int c = 0; c < NC; c++) begin
      for (int i = 0; i < 3; i++) begin
        for (int j = 0; j < 3; j++) cams[c].r[i][j] = qr(est_r[c][i][j]);
        cams[c].t[i] = qr(est_t[c][i]);
      end
      @(negedge clk); cam_we = 1; cam_waddr = CAW'(c); cam_wdata = cams[c];
    end
    @(negedge clk); cam_we = 0;
  endtask

  // Solve a 6x6 system by Gaussian elimination with partial pivoting.
  function automatic void solve6(real a_in [6][6], real b_in [6], output real x [6]);
    real a [6][7], tmp, f;
    for (int i = 0; i < 6; i++) begin
      for (int j = 0; j < 6; j++) a[i][j] = a_in[i][j];
      a[i][6] = b_in[i];
    end
    for (int col = 0; col < 6; col++) begin
      int piv;
      piv = col;
      for (int i = col + 1; i < 6; i++) if (fabs(a[i][col]) > fabs(a[piv][col])) piv = i;
      for (int j = 0; j < 7; j++) begin tmp = a[col][j]; a[col][j] = a[piv][j]; a[piv][j] = tmp; end
      for (int i = col + 1; i < 6; i++) begin
        f = a[i][col] / a[col][col];
        for (int j = col; j < 7; j++) a[i][j] -= f * a[col][j];
      end
    end
    for (int i = 5; i >= 0; i--) begin
      x[i] = a[i][6];
      for (int j = i + 1; j < 6; j++) x[i] -= a[i][j] * x[j];
      x[i] /= a[i][i];
    end
  endfunction

  // Compare one result with the reference and accumulate the normal equations.
  task automatic take_out(int o, inout real ssq);
    real ps [3], x, y, z, w [2][9], rr [3][3], e, e0, e1;
    int c;
    c = o / NP;
    cam_point(o, ps);
    x = ps[0]; y = ps[1]; z = ps[2];
    for (int i = 0; i < 3; i++) for (int j = 0; j < 3; j++) rr[i][j] = rq(cams[c].r[i][j]);
    for (int j = 0; j < 3; j++) begin
      w[0][j] = rr[0][j] / z - rr[2][j] * x / (z*z);
      w[1][j] = rr[1][j] / z - rr[2][j] * y / (z*z);
    end
    w[0][3] = -x*y/(z*z);         w[0][4] = 1.0 + x*x/(z*z); w[0][5] = -y/z;
    w[1][3] = -(1.0 + y*y/(z*z)); w[1][4] = x*y/(z*z);       w[1][5] = x/z;
    w[0][6] = 1.0/z; w[0][7] = 0.0;   w[0][8] = -x/(z*z);
    w[1][6] = 0.0;   w[1][7] = 1.0/z; w[1][8] = -y/(z*z);
    checks++;
    begin
      bit bad;
      bad = 0;
      for (int r = 0; r < 2; r++) for (int k = 0; k < 9; k++) begin
        e = fabs(rq(out_jac[r][k]) - w[r][k]);
        if (e > 1.0/2048) bad = 1;
      end
      e0 = fabs(rq(out_res[0]) - (rq(o_u[o]) - x/z));
      e1 = fabs(rq(out_res[1]) - (rq(o_v[o]) - y/z));
      if (e0 > 1.0/4096 || e1 > 1.0/4096) bad = 1;
      if (bad) begin
        failures++;
        if (failures < 10) $display("FAIL observation %0d differs from the reference", o);
      end
    end
    // normal equations from the hardware's own outputs (pose columns 3..8)
    for (int r = 0; r < 2; r++) begin
      real jr [6], res;
      for (int k = 0; k < 6; k++) jr[k] = rq(out_jac[r][3+k]);
      res = rq(out_res[r]);
      ssq += res * res;
      for (int i = 0; i < 6; i++) begin
        g[c][i] += jr[i] * res;
        for (int j = 0; j < 6; j++) h[c][i][j] += jr[i] * jr[j];
      end
    end
  endtask

  initial begin
    real rms [ITER], mu;
    int total_cycles;
    mu = 1.0e-6;
    total_cycles = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // true poses and their perturbed starting estimates
    for (int c = 0; c < NC; c++) begin
      true_r[c] = rexp(urand(-0.2, 0.2), urand(-0.2, 0.2), urand(-0.2, 0.2));
      for (int i = 0; i < 3; i++) true_t[c][i] = urand(-0.3, 0.3);
      est_r[c] = mmul(rexp(urand(-0.03, 0.03), urand(-0.03, 0.03), urand(-0.03, 0.03)), true_r[c]);
      for (int i = 0; i < 3; i++) est_t[c][i] = true_t[c][i] + urand(-0.05, 0.05);
    end
    for (int p = 0; p < NP; p++) begin
      pts[p].p[0] = qr(urand(-1.5, 1.5)); pts[p].p[1] = qr(urand(-1.5, 1.5));
      pts[p].p[2] = qr(urand(2.5, 5.0));
      @(negedge clk); pt_we = 1; pt_waddr = PAW'(p); pt_wdata = pts[p];
    end
    @(negedge clk); pt_we = 0;
    for (int o = 0; o < NO; o++) begin
      real q [3];
      int c, p;
      c = o / NP; p = o % NP;
      for (int i = 0; i < 3; i++)
        q[i] = true_r[c][i][0] * rq(pts[p].p[0]) + true_r[c][i][1] * rq(pts[p].p[1]) +
               true_r[c][i][2] * rq(pts[p].p[2]) + true_t[c][i];
      o_u[o] = qr(q[0] / q[2] + urand(-0.001, 0.001));
      o_v[o] = qr(q[1] / q[2] + urand(-0.001, 0.001));
      @(negedge clk);
      obs_we = 1; obs_waddr = OAW'(o); obs_wcam = CAW'(c); obs_wpoint = PAW'(p);
      obs_wu = o_u[o]; obs_wv = o_v[o];
    end
    @(negedge clk); obs_we = 0;

    for (int it = 0; it < ITER; it++) begin
      real ssq;
      int seen, t;
      ssq = 0.0;
      for (int c = 0; c < NC; c++) for (int i = 0; i < 6; i++) begin
        g[c][i] = 0.0;
        for (int j = 0; j < 6; j++) h[c][i][j] = 0.0;
      end
      load_cams();
      num_obs = (OAW+1)'(NO);
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      t = 1; seen = 0;
      while (!done) begin
        if (out_valid) begin
          checks++;
          if (int'(out_idx) != seen) begin failures++; $display("FAIL order"); end
          take_out(seen, ssq);
          seen++;
        end
        @(negedge clk); t++;
      end
      total_cycles += t;
      checks++;
      if (t != 32 * NO + 1 || seen != NO) begin
        failures++;
        $display("FAIL pass %0d: %0d cycles, %0d observations", it, t, seen);
      end
      rms[it] = $sqrt(ssq / real'(2 * NO));
      $display("iteration %0d: RMS residual %e", it + 1, rms[it]);
      if (it > 0) begin
        checks++;
        if (rms[it] > rms[it-1] * 1.05 + 1.0e-5) begin
          failures++;
          $display("FAIL RMS grew from %e to %e", rms[it-1], rms[it]);
        end
      end
      // host update of both poses
      for (int c = 0; c < NC; c++) begin
        real dlt [6], hh [6][6];
        m3_t dr;
        v3_t tn;
        hh = h[c];
        for (int i = 0; i < 6; i++) hh[i][i] += mu;
        solve6(hh, g[c], dlt);
        dr = rexp(dlt[0], dlt[1], dlt[2]);
        est_r[c] = mmul(dr, est_r[c]);
        for (int i = 0; i < 3; i++)
          tn[i] = dr[i][0] * est_t[c][0] + dr[i][1] * est_t[c][1] + dr[i][2] * est_t[c][2] + dlt[3+i];
        est_t[c] = tn;
      end
    end
    checks++;
    if (rms[ITER-1] > 0.002 || rms[ITER-1] > rms[0] / 5.0) begin
      failures++;
      $display("FAIL final RMS %e (first %e)", rms[ITER-1], rms[0]);
    end
    for (int c = 0; c < NC; c++) begin
      real err;
      err = 0.0;
      for (int i = 0; i < 3; i++) begin
        err += fabs(est_t[c][i] - true_t[c][i]);
        for (int j = 0; j < 3; j++) err += fabs(est_r[c][i][j] - true_r[c][i][j]);
      end
      $display("camera %0d: summed pose error %e", c, err);
      checks++;
      if (err > 0.01) begin failures++; $display("FAIL camera %0d pose not recovered", c); end
    end
    $display("%0d iterations: %0d accelerator cycles, %.2f ms at 134 MHz",
             ITER, total_cycles, real'(total_cycles) / 134.0e3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
