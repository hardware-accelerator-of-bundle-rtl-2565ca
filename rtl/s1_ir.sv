// s1_ir: the input memory ("S1-IR") that holds one bundle-adjustment
// problem and hands the accelerator the data of one observation at a time.
//
// Three memories are held: the observation table (for each observation, the
// camera that sees it, the 3D point seen, and the measured image position
// u, v), the 3D points [X Y Z], and the camera poses (R, t). The original
// design fills the memory from a file before each iteration and reads
// the operands out in parallel; here a synchronous write port per memory
// stands in for that file load, so a host can rewrite the contents between
// iterations (this design's choice).
//
// Read timing: rd_en with rd_addr (an observation index) reads the
// observation table on that edge; on the next edge the point and camera it
// names are read in parallel, and out_valid is high in the cycle after.
// All outputs hold until the next read. The memories have no reset: their
// contents must be written before use.
//
// Default sizes follow the two-image test set of the original design: 1465
// points seen by 2 cameras, so 2930 observations.
module s1_ir
  import ba_pkg::*;
#(
  parameter int unsigned N_OBS    = 2930,
  parameter int unsigned N_POINTS = 1465,
  parameter int unsigned N_CAMS   = 2,
  localparam int unsigned OAW = $clog2(N_OBS),
  localparam int unsigned PAW = (N_POINTS > 1) ? $clog2(N_POINTS) : 1,
  localparam int unsigned CAW = (N_CAMS > 1) ? $clog2(N_CAMS) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  // loading
  input  logic           obs_we,
  input  logic [OAW-1:0] obs_waddr,
  input  logic [CAW-1:0] obs_wcam,
  input  logic [PAW-1:0] obs_wpoint,
  input  q_t             obs_wu,
  input  q_t             obs_wv,
  input  logic           pt_we,
  input  logic [PAW-1:0] pt_waddr,
  input  point_t         pt_wdata,
  input  logic           cam_we,
  input  logic [CAW-1:0] cam_waddr,
  input  cam_t           cam_wdata,
  // reading
  input  logic           rd_en,
  input  logic [OAW-1:0] rd_addr,
  output logic           out_valid,
  output cam_t           cam,
  output point_t         point,
  output q_t             u_obs,
  output q_t             v_obs
);
  typedef struct packed {
    logic [CAW-1:0] cam;
    logic [PAW-1:0] point;
    q_t             u;
    q_t             v;
  } obs_t;

  obs_t   obs_mem [N_OBS];
  point_t pt_mem  [N_POINTS];
  cam_t   cam_mem [N_CAMS];

  always_ff @(posedge clk) begin
    if (obs_we) obs_mem[obs_waddr] <= '{cam: obs_wcam, point: obs_wpoint, u: obs_wu, v: obs_wv};
    if (pt_we)  pt_mem[pt_waddr]   <= pt_wdata;
    if (cam_we) cam_mem[cam_waddr] <= cam_wdata;
  end

  obs_t obs_q;
  logic ph1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      obs_q     <= '0;
      ph1       <= 1'b0;
      out_valid <= 1'b0;
      cam       <= '0;
      point     <= '0;
      u_obs     <= '0;
      v_obs     <= '0;
    end else begin
      ph1       <= rd_en;
      out_valid <= ph1;
      if (rd_en) obs_q <= obs_mem[rd_addr];
      if (ph1) begin
        cam   <= cam_mem[obs_q.cam];
        point <= pt_mem[obs_q.point];
        u_obs <= obs_q.u;
        v_obs <= obs_q.v;
      end
    end
  end
endmodule
