// tb_s3_jacobian: checks the 2 x 9 Jacobian block. It draws a rotation
// matrix and a camera-frame point, forms the stage inputs from them, and
// compares every entry with the derivative worked out in double precision
// from the point itself: the point columns from R and the quotient rule,
// the rotation and translation columns by differentiating the projection of
// the perturbed point numerically (central differences). Tolerance 2^-10.
// The result must be valid exactly two cycles after in_valid.
module tb_s3_jacobian;
  import ba_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  q_t [2:0][2:0] r;
  q_t iz, a, b, c, d, ab, aa, bb;
  jac_t jac;
  int checks = 0, failures = 0;

  s3_jacobian dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

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

  // Projection (u or v) of camera-frame point p after a small left
  // perturbation exp(xi) with xi = [w; t] applied to it.
  function automatic real proj(real p [3], int k, int row, real h);
    real q [3], w [3], tt [3];
    w = '{0.0, 0.0, 0.0}; tt = '{0.0, 0.0, 0.0};
    if (k < 3) w[k] = h; else tt[k-3] = h;
    // first-order rotation (I + w^) p + t
    q[0] = p[0] + (w[1] * p[2] - w[2] * p[1]) + tt[0];
    q[1] = p[1] + (w[2] * p[0] - w[0] * p[2]) + tt[1];
    q[2] = p[2] + (w[0] * p[1] - w[1] * p[0]) + tt[2];
    return (row == 0) ? q[0] / q[2] : q[1] / q[2];
  endfunction

  initial begin
    r = '0; {iz, a, b, c, d, ab, aa, bb} = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < 1500; n++) begin
      real rr [3][3], p [3], z, want [2][9], h;
      for (int i = 0; i < 3; i++)
        for (int j = 0; j < 3; j++) begin rr[i][j] = urand(-1.0, 1.0); r[i][j] = qr(rr[i][j]); rr[i][j] = rq(r[i][j]); end
      p[0] = urand(-2.0, 2.0); p[1] = urand(-2.0, 2.0); p[2] = urand(1.5, 5.0);
      z = p[2];
      iz = qr(1.0 / z);
      a = qr(p[0] / z); b = qr(p[1] / z); c = qr(p[0] / (z * z)); d = qr(p[1] / (z * z));
      ab = qr(p[0] * p[1] / (z * z)); aa = qr(p[0] * p[0] / (z * z)); bb = qr(p[1] * p[1] / (z * z));
      for (int j = 0; j < 3; j++) begin
        want[0][j] = rr[0][j] / z - rr[2][j] * p[0] / (z * z);
        want[1][j] = rr[1][j] / z - rr[2][j] * p[1] / (z * z);
      end
      h = 1.0e-6;
      for (int k = 0; k < 6; k++)
        for (int row = 0; row < 2; row++)
          want[row][3+k] = (proj(p, k, row, h) - proj(p, k, row, -h)) / (2.0 * h);
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      r = '0; {iz, a, b, c, d, ab, aa, bb} = '0;
      checks++;
      if (out_valid) begin failures++; $display("FAIL valid after 1 cycle"); end
      @(negedge clk);
      checks++;
      if (!out_valid) begin failures++; $display("FAIL no valid after 2 cycles"); end
      for (int row = 0; row < 2; row++)
        for (int col = 0; col < 9; col++) begin
          checks++;
          if (fabs(rq(jac[row][col]) - want[row][col]) > 1.0/1024) begin
            failures++;
            if (failures < 20)
              $display("FAIL J[%0d][%0d] got %f want %f", row, col, rq(jac[row][col]), want[row][col]);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
