// tb_cc_residual: checks the cost-calculation stage: r = observed - predicted
// for both image axes, registered one cycle after in_valid and held after.
module tb_cc_residual;
  import ba_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  q_t u_obs, v_obs, u_pred, v_pred;
  q_t [1:0] r;
  int checks = 0, failures = 0;

  cc_residual dut (.clk, .rst_n, .in_valid, .u_obs, .v_obs, .u_pred, .v_pred, .out_valid, .r);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int clampi(longint v);
    if (v > 524287) return 524287;
    if (v < -524288) return -524288;
    return int'(v);
  endfunction

  initial begin
    {u_obs, v_obs, u_pred, v_pred} = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      int uo, vo, up, vp;
      uo = int'($urandom_range(0, 1048575)) - 524288;
      vo = int'($urandom_range(0, 1048575)) - 524288;
      up = int'($urandom_range(0, 1048575)) - 524288;
      vp = int'($urandom_range(0, 1048575)) - 524288;
      if (i % 2 == 0) begin uo /= 8; vo /= 8; up /= 8; vp /= 8; end
      u_obs = q_t'(uo); v_obs = q_t'(vo); u_pred = q_t'(up); v_pred = q_t'(vp);
      in_valid = 1;
      @(posedge clk); #1;
      in_valid = 0;
      checks++;
      if (!out_valid || int'(r[0]) != clampi(longint'(uo) - up) || int'(r[1]) != clampi(longint'(vo) - vp)) begin
        failures++;
        $display("FAIL residual: got %0d %0d", int'(r[0]), int'(r[1]));
      end
      u_obs = q_t'($urandom);
      @(posedge clk); #1;
      checks++;
      if (out_valid || int'(r[0]) != clampi(longint'(uo) - up)) begin
        failures++;
        $display("FAIL residual not held or valid not a pulse");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
