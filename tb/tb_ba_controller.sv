// tb_ba_controller: checks the control state machine against stage models
// in the testbench that answer each go strobe with a valid pulse after the
// real stages' latencies (S1-IR 2, S1 2, Szrs 19, preS3 2, S3 2 cycles).
// Checked: every observation index appears once and in order on out_idx,
// each stage is started once per observation, observations follow each
// other every 32 cycles, done pulses once after the last one, busy spans
// the run, start while busy is ignored, and num_obs = 0 does nothing.
module tb_ba_controller;
  localparam int NO = 50;
  localparam int OAW = $clog2(NO);
  logic clk = 0, rst_n = 0, start = 0;
  logic [OAW:0] num_obs = 0;
  logic rd_en, s1_go, div_start, pre_go, s3_go, out_valid, busy, done;
  logic ir_valid, s1_valid, div_done, pre_valid, s3_valid;
  logic [OAW-1:0] rd_addr, out_idx;
  int checks = 0, failures = 0;

  ba_controller #(.N_OBS(NO)) dut (.*);
  always #5 clk = ~clk;

  // Stage models: shift registers giving each stage's latency.
  logic [1:0]  d_ir = 0, d_s1 = 0, d_pre = 0, d_s3 = 0;
  logic [18:0] d_div = 0;
  always_ff @(posedge clk) begin
    d_ir  <= {d_ir[0], rd_en};
    d_s1  <= {d_s1[0], s1_go};
    d_div <= {d_div[17:0], div_start};
    d_pre <= {d_pre[0], pre_go};
    d_s3  <= {d_s3[0], s3_go};
  end
  assign ir_valid  = d_ir[1];
  assign s1_valid  = d_s1[1];
  assign div_done  = d_div[18];
  assign pre_valid = d_pre[1];
  assign s3_valid  = d_s3[1];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Counters over one run.
  int n_out, n_rd, n_s1, n_div, n_pre, n_s3, n_done, last_out_cyc, cyc;
  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    if (rd_en) n_rd <= n_rd + 1;
    if (s1_go) n_s1 <= n_s1 + 1;
    if (div_start) n_div <= n_div + 1;
    if (pre_go) n_pre <= n_pre + 1;
    if (s3_go) n_s3 <= n_s3 + 1;
    if (done) n_done <= n_done + 1;
    if (out_valid) begin
      checks++;
      if (int'(out_idx) != n_out) begin
        failures++;
        $display("FAIL out_idx %0d, want %0d", out_idx, n_out);
      end
      if (n_out > 0) begin
        checks++;
        if (cyc - last_out_cyc != 32) begin
          failures++;
          $display("FAIL feature period %0d cycles, want 32", cyc - last_out_cyc);
        end
      end
      last_out_cyc <= cyc;
      n_out <= n_out + 1;
    end
  end

  task automatic run(int n, bit poke);
    n_out = 0; n_rd = 0; n_s1 = 0; n_div = 0; n_pre = 0; n_s3 = 0; n_done = 0;
    num_obs = (OAW+1)'(n);
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    if (n == 0) begin
      checks++;
      if (busy) begin failures++; $display("FAIL busy with num_obs = 0"); end
      repeat (50) @(negedge clk);
    end else begin
      checks++;
      if (!busy) begin failures++; $display("FAIL not busy after start"); end
      if (poke) begin
        repeat (100) @(negedge clk);
        start = 1; @(negedge clk); start = 0;     // must be ignored
      end
      while (!done) @(negedge clk);
      @(negedge clk);
      checks++;
      if (busy) begin failures++; $display("FAIL busy after done"); end
      repeat (40) @(negedge clk);
    end
    checks++;
    if (n_out != n || n_rd != n || n_s1 != n || n_div != n || n_pre != n || n_s3 != n ||
        n_done != (n > 0 ? 1 : 0)) begin
      failures++;
      $display("FAIL run of %0d: out %0d rd %0d s1 %0d div %0d pre %0d s3 %0d done %0d",
               n, n_out, n_rd, n_s1, n_div, n_pre, n_s3, n_done);
    end
  endtask

  initial begin
    cyc = 0; last_out_cyc = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(1, 0);
    run(NO, 1);
    run(0, 0);
    run(7, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
