// tb_pre_s3: checks the shared-product stage: x*/z*, y*/z*, x*/z*^2, y*/z*^2
// and the products a*b, a*a, b*b, against double precision on the same
// inputs (within 3 LSB: products of rounded products), with the result
// valid exactly two cycles after in_valid.
module tb_pre_s3;
  import ba_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  q_t xs, ys, iz, a, b, c, d, ab, aa, bb;
  int checks = 0, failures = 0;

  pre_s3 dut (.*);
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
  task automatic cmp(string nm, q_t got, real want);
    checks++;
    if (fabs(rq(got) - want) > 3.0/65536) begin
      failures++;
      $display("FAIL %s got %f want %f", nm, rq(got), want);
    end
  endtask

  initial begin
    xs = 0; ys = 0; iz = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < 2000; n++) begin
      real ra, rb, rc, rd, rz;
      xs = qrand(-2.5, 2.5); ys = qrand(-2.5, 2.5); iz = qrand(0.2, 1.0);
      rz = rq(iz);
      ra = rq(xs) * rz; rb = rq(ys) * rz; rc = rq(xs) * rz * rz; rd = rq(ys) * rz * rz;
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      xs = 0; ys = 0;            // iz must hold; xs, ys only with in_valid
      checks++;
      if (out_valid) begin failures++; $display("FAIL valid after 1 cycle"); end
      @(negedge clk);
      checks++;
      if (!out_valid) begin failures++; $display("FAIL no valid after 2 cycles"); end
      cmp("a", a, ra); cmp("b", b, rb); cmp("c", c, rc); cmp("d", d, rd);
      cmp("ab", ab, ra * rb); cmp("aa", aa, ra * ra); cmp("bb", bb, rb * rb);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
