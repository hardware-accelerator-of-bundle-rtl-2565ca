// tb_q_mul: checks the Q4.16 multiplier against a real-valued reference:
// random and corner operands, result = a*b rounded to nearest and clamped to
// [-8, 8), valid one cycle after en; the output must hold while en is low.
module tb_q_mul;
  import ba_pkg::*;
  logic clk = 0, rst_n = 0, en = 0;
  q_t a, b, p;
  int checks = 0, failures = 0;

  q_mul dut (.clk, .rst_n, .en, .a, .b, .p);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expect_mul(int x, int y);
    real r;
    r = $floor(real'(x) * real'(y) / 65536.0 + 0.5);
    if (r > 524287.0) return 524287;
    if (r < -524288.0) return -524288;
    return int'(r);
  endfunction

  task automatic one(int x, int y);
    q_t held;
    a = q_t'(x); b = q_t'(y); en = 1;
    @(posedge clk); #1;
    en = 0;
    checks++;
    if (int'(p) != expect_mul(x, y)) begin
      failures++;
      $display("FAIL %0d * %0d: got %0d want %0d", x, y, int'(p), expect_mul(x, y));
    end
    held = p;
    a = q_t'($urandom); b = q_t'($urandom);
    @(posedge clk); #1;
    checks++;
    if (p !== held) begin failures++; $display("FAIL output moved without en"); end
  endtask

  initial begin
    a = 0; b = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    one(65536, 65536);         // 1*1
    one(-65536, 98304);        // -1*1.5
    one(32768, 1);             // 0.5*2^-16 -> rounds to 1 LSB
    one(-32768, 1);            // -0.5 LSB -> rounds toward +inf to 0
    one(524287, 524287);       // saturate high
    one(-524288, 524287);      // saturate low
    one(196608, 196608);       // 3*3 = 9 -> saturate
    for (int i = 0; i < 2000; i++) begin
      int x, y;
      x = int'($urandom_range(0, 1048575)) - 524288;
      y = int'($urandom_range(0, 1048575)) - 524288;
      if (i % 2 == 0) begin x = x / 4; y = y / 4; end
      one(x, y);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
