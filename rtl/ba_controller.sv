// ba_controller: the control state machine of the accelerator. After start it
// walks through the observations 0 .. num_obs-1, one at a time, and for each
// one issues the stages in order and waits for each to report back:
//
//   RD  -> W_RD   read the observation, its point and camera from S1-IR
//   S1  -> W_S1   transform the point into the camera frame (x*, y*, z*)
//   DIV -> W_DIV  Szrs: 1/z* in the Newton divider
//   PRE -> W_PRE  preS3: shared products of 1/z*
//   S3  -> W_S3   Jacobian block (JU) and residual (CC) in parallel
//
// Each issue state raises its stage's go strobe for one cycle; each wait
// state holds until that stage's valid pulse. When the Jacobian block is
// valid, out_valid is raised for that cycle with out_idx = the observation
// index, and the next observation is read in the following cycle, so the
// next read follows the previous one by exactly 32 cycles with the default
// stage latencies (2 + 2 + 19 + 2 + 2 cycles of stage work and one decision
// cycle after each). That equals the 32 cycles per feature the original design
// reports. After the last observation, done pulses for one cycle and the
// machine returns to IDLE; start is ignored while busy.
//
// The stage order and the 32-cycle feature period follow the original design;
// the exact state list is this design's reading of its controller.
module ba_controller #(
  parameter int unsigned N_OBS = 2930,
  localparam int unsigned OAW = $clog2(N_OBS)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [OAW:0]   num_obs,
  // stage handshakes
  output logic           rd_en,
  output logic [OAW-1:0] rd_addr,
  input  logic           ir_valid,
  output logic           s1_go,
  input  logic           s1_valid,
  output logic           div_start,
  input  logic           div_done,
  output logic           pre_go,
  input  logic           pre_valid,
  output logic           s3_go,
  input  logic           s3_valid,
  // status
  output logic           out_valid,
  output logic [OAW-1:0] out_idx,
  output logic           busy,
  output logic           done
);
  typedef enum logic [3:0] {
    IDLE, RD, W_RD, S1, W_S1, DIV, W_DIV, PRE, W_PRE, S3, W_S3, FIN
  } state_t;

  state_t state, nstate;
  logic [OAW-1:0] idx;

  always_comb begin
    nstate = state;
    unique case (state)
      IDLE:  if (start && num_obs != '0) nstate = RD;
      RD:    nstate = W_RD;
      W_RD:  if (ir_valid)  nstate = S1;
      S1:    nstate = W_S1;
      W_S1:  if (s1_valid)  nstate = DIV;
      DIV:   nstate = W_DIV;
      W_DIV: if (div_done)  nstate = PRE;
      PRE:   nstate = W_PRE;
      W_PRE: if (pre_valid) nstate = S3;
      S3:    nstate = W_S3;
      W_S3:  if (s3_valid)  nstate = ((OAW+1)'(idx) + 1'b1 == num_obs) ? FIN : RD;
      FIN:   nstate = IDLE;
      default: nstate = IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      idx   <= '0;
    end else begin
      state <= nstate;
      if (state == IDLE) idx <= '0;
      else if (state == W_S3 && s3_valid) idx <= idx + 1'b1;
    end
  end

  always_comb begin
    rd_en     = (state == RD);
    rd_addr   = idx;
    s1_go     = (state == S1);
    div_start = (state == DIV);
    pre_go    = (state == PRE);
    s3_go     = (state == S3);
    out_valid = (state == W_S3) && s3_valid;
    out_idx   = idx;
    busy      = (state != IDLE);
    done      = (state == FIN);
  end

  // Each stage reports back only while the controller waits for it.
  a_ir_valid:  assert property (@(posedge clk) disable iff (!rst_n) ir_valid  |-> state == W_RD);
  a_s1_valid:  assert property (@(posedge clk) disable iff (!rst_n) s1_valid  |-> state == W_S1);
  a_div_done:  assert property (@(posedge clk) disable iff (!rst_n) div_done  |-> state == W_DIV);
  a_pre_valid: assert property (@(posedge clk) disable iff (!rst_n) pre_valid |-> state == W_PRE);
  a_s3_valid:  assert property (@(posedge clk) disable iff (!rst_n) s3_valid  |-> state == W_S3);
endmodule
