// tb_s1_transform: checks x*, y*, z* = R P + t for random poses and points
// against double-precision arithmetic on the same Q4.16 inputs (within 4
// LSB: three rounded products), and that the result appears exactly two
// cycles after in_valid.
module tb_s1_transform;
  import ba_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  cam_t cam;
  point_t point;
  q_t xs, ys, zs;
  int checks = 0, failures = 0;

  s1_transform dut (.*);
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
  function automatic q_t qrand(real lo, real hi);
    return q_t'(int'((lo + (hi - lo) * real'($urandom_range(0, 1000000)) / 1.0e6) * 65536.0));
  endfunction

  initial begin
    cam = '0; point = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < 2000; n++) begin
      real w [3];
      for (int i = 0; i < 3; i++) begin
        for (int j = 0; j < 3; j++) cam.r[i][j] = qrand(-1.0, 1.0);
        cam.t[i] = qrand(-1.0, 1.0);
        point.p[i] = qrand(-2.0, 2.0);
      end
      for (int i = 0; i < 3; i++)
        w[i] = rq(cam.r[i][0]) * rq(point.p[0]) + rq(cam.r[i][1]) * rq(point.p[1]) +
               rq(cam.r[i][2]) * rq(point.p[2]) + rq(cam.t[i]);
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      cam = '0; point = '0;      // inputs need only be valid with in_valid
      checks++;
      if (out_valid) begin failures++; $display("FAIL valid after 1 cycle"); end
      @(negedge clk);
      checks++;
      if (!out_valid) begin failures++; $display("FAIL no valid after 2 cycles"); end
      checks += 3;
      if (fabs(rq(xs) - w[0]) > 4.0/65536 || fabs(rq(ys) - w[1]) > 4.0/65536 ||
          fabs(rq(zs) - w[2]) > 4.0/65536) begin
        failures++;
        $display("FAIL got %f %f %f want %f %f %f", rq(xs), rq(ys), rq(zs), w[0], w[1], w[2]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
