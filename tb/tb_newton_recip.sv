// tb_newton_recip: checks the Newton-Raphson reciprocal unit. For random
// operands over the whole Q4.16 range (both signs) and for corner cases it
// compares q with 1/x computed in double precision (within one LSB, or the
// clamped value where |1/x| >= 8), and it checks that done comes exactly 19
// cycles after start and that busy covers the operation.
module tb_newton_recip;
  import ba_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  q_t x, q;
  logic busy, done;
  int checks = 0, failures = 0;

  newton_recip dut (.clk, .rst_n, .start, .x, .busy, .done, .q);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(int xv);
    int cycles;
    real want;
    int w;
    x = q_t'(xv); start = 1;
    @(posedge clk); #1;
    start = 0;
    x = q_t'($urandom);         // operand need only be valid with start
    cycles = 1;
    while (!done) begin
      if (!busy) begin failures++; $display("FAIL busy low during operation"); end
      @(posedge clk); #1;
      cycles++;
    end
    checks++;
    if (cycles != 19) begin failures++; $display("FAIL latency %0d, want 19", cycles); end
    if (xv == 0) w = 524287;
    else begin
      want = 65536.0 / (real'(xv) / 65536.0);
      if (want >= 524287.0) w = 524287;
      else if (want <= -524287.0) w = -524287;
      else w = int'($floor(want + 0.5));
    end
    checks++;
    if (int'(q) - w > 1 || w - int'(q) > 1) begin
      failures++;
      $display("FAIL 1/%0d: got %0d want %0d", xv, int'(q), w);
    end
    @(posedge clk); #1;
  endtask

  initial begin
    x = 0;
    repeat (2) @(posedge clk);
    rst_n = 1; #1;
    one(65536);        // 1
    one(131072);       // 2
    one(-196608);      // -3
    one(524287);       // just under 8
    one(-524288);      // -8
    one(8192);         // 0.125 -> 8, clamps
    one(8193);         // just above 0.125
    one(1);            // tiny, clamps
    one(0);            // zero, clamps
    one(216179);       // 3.2986
    for (int i = 0; i < 3000; i++) begin
      int v;
      v = int'($urandom_range(8193, 524287));
      if ($urandom % 2) v = -v;
      one(v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
