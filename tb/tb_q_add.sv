// tb_q_add: checks the Q4.16 adder/subtractor: random and corner operands,
// sum or difference clamped to [-8, 8), against integer arithmetic.
module tb_q_add;
  import ba_pkg::*;
  logic sub;
  q_t a, b, s;
  int checks = 0, failures = 0;

  q_add dut (.sub, .a, .b, .s);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(int x, int y, bit op);
    longint e;
    a = q_t'(x); b = q_t'(y); sub = op;
    #1;
    e = op ? longint'(x) - longint'(y) : longint'(x) + longint'(y);
    if (e > 524287) e = 524287;
    if (e < -524288) e = -524288;
    checks++;
    if (longint'(s) != e) begin
      failures++;
      $display("FAIL %0d %s %0d: got %0d want %0d", x, op ? "-" : "+", y, int'(s), e);
    end
  endtask

  initial begin
    one(65536, 65536, 0);
    one(65536, 65536, 1);
    one(524287, 1, 0);          // overflow high
    one(-524288, 1, 1);         // overflow low
    one(-524288, -524288, 0);
    one(0, -524288, 1);         // -(-8) saturates
    for (int i = 0; i < 5000; i++)
      one(int'($urandom_range(0, 1048575)) - 524288,
          int'($urandom_range(0, 1048575)) - 524288, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
