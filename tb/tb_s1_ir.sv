// tb_s1_ir: checks the input memory. It fills the observation, point and
// camera tables with random contents (keeping a copy), reads observations in
// random order and checks that camera, point and measured position arrive
// together two cycles after rd_en, that out_valid is a one-cycle pulse and
// that the outputs hold between reads. Small table sizes keep it short.
module tb_s1_ir;
  import ba_pkg::*;
  localparam int NO = 40, NP = 20, NC = 3;
  localparam int OAW = $clog2(NO), PAW = $clog2(NP), CAW = $clog2(NC);
  logic clk = 0, rst_n = 0;
  logic obs_we = 0, pt_we = 0, cam_we = 0, rd_en = 0, out_valid;
  logic [OAW-1:0] obs_waddr = 0, rd_addr = 0;
  logic [CAW-1:0] obs_wcam = 0, cam_waddr = 0;
  logic [PAW-1:0] obs_wpoint = 0, pt_waddr = 0;
  q_t obs_wu = 0, obs_wv = 0, u_obs, v_obs;
  point_t pt_wdata = '0, point;
  cam_t cam_wdata = '0, cam;
  int checks = 0, failures = 0;

  int     m_cam [NO], m_pt [NO];
  q_t     m_u [NO], m_v [NO];
  point_t m_point [NP];
  cam_t   m_camd [NC];

  s1_ir #(.N_OBS(NO), .N_POINTS(NP), .N_CAMS(NC)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < NC; i++) begin
      for (int k = 0; k < 12; k++) m_camd[i][k*QW +: QW] = q_t'($urandom);
      cam_we = 1; cam_waddr = CAW'(i); cam_wdata = m_camd[i];
      @(negedge clk);
    end
    cam_we = 0;
    for (int i = 0; i < NP; i++) begin
      for (int k = 0; k < 3; k++) m_point[i].p[k] = q_t'($urandom);
      pt_we = 1; pt_waddr = PAW'(i); pt_wdata = m_point[i];
      @(negedge clk);
    end
    pt_we = 0;
    for (int i = 0; i < NO; i++) begin
      m_cam[i] = $urandom_range(0, NC-1); m_pt[i] = $urandom_range(0, NP-1);
      m_u[i] = q_t'($urandom); m_v[i] = q_t'($urandom);
      obs_we = 1; obs_waddr = OAW'(i); obs_wcam = CAW'(m_cam[i]); obs_wpoint = PAW'(m_pt[i]);
      obs_wu = m_u[i]; obs_wv = m_v[i];
      @(negedge clk);
    end
    obs_we = 0;
    for (int n = 0; n < 300; n++) begin
      int o;
      o = $urandom_range(0, NO-1);
      rd_en = 1; rd_addr = OAW'(o);
      @(negedge clk);
      rd_en = 0; rd_addr = OAW'($urandom);
      checks++;
      if (out_valid) begin failures++; $display("FAIL valid too early"); end
      @(negedge clk);
      checks++;
      if (!out_valid || cam != m_camd[m_cam[o]] || point != m_point[m_pt[o]] ||
          u_obs != m_u[o] || v_obs != m_v[o]) begin
        failures++;
        $display("FAIL read of observation %0d", o);
      end
      @(negedge clk);
      checks++;
      if (out_valid || u_obs != m_u[o] || cam != m_camd[m_cam[o]]) begin
        failures++;
        $display("FAIL output not held or valid not a pulse");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
