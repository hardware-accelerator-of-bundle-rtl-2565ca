// newton_recip: the "Szrs" stage, computing 1/z* for one observation with the
// Newton-Raphson iteration z(n+1) = z(n) * (2 - x * z(n)), which is the
// Newton step for f(z) = 1/z - x.
//
// How it works. The operand's magnitude |x| is taken first. A leading-one
// detector gives the power of two 2^-k with |x| * 2^-k in [0.5, 1); that is
// the first guess z(0), so the relative error starts below 1/2 and squares
// with every step. ITERS steps follow (8 by default, as in the original design),
// each using two multiplications in sequence (x*z, then z*(2 - x*z)) on two
// multipliers. The iterate is held with IFRAC fraction bits, more than the
// 16 of Q4.16, so rounding errors of the steps stay below the output LSB;
// the result is rounded to Q4.16, given the sign of x, and saturated.
//
// Timing: start is sampled on a rising edge while busy is low; done pulses
// for one cycle with q valid LATENCY = ITERS*2 + 3 cycles later (19 for
// ITERS = 8: one cycle to register |x|, one for the first guess, two per
// step, one to round). q holds until the next result. x = 0 gives Q_MAX
// with the sign of +0, and |1/x| >= 8 saturates.
//
// The iteration formula, the 8 iterations and the 19 cycles per division
// follow the original design. The first-guess rule, IFRAC and the rounding are
// this design's choices.
module newton_recip
  import ba_pkg::*;
#(
  parameter int unsigned ITERS = 8,
  parameter int unsigned IFRAC = 24
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  q_t   x,
  output logic busy,
  output logic done,
  output q_t   q
);
  // Iterate: up to 2^16 (1/2^-16) with IFRAC fraction bits, plus sign room.
  localparam int unsigned ZW = IFRAC + QF + 2;

  typedef enum logic [2:0] {S_IDLE, S_GUESS, S_MUL1, S_MUL2, S_ROUND} state_t;
  state_t state;

  logic [QW-1:0]       xa;      // |x|, Q3.16 unsigned
  logic                neg;
  logic                zero;
  logic [ZW-1:0]       z;       // iterate, IFRAC fraction bits
  logic [ZW-1:0]       tcorr;   // 2 - x*z, IFRAC fraction bits
  logic [$clog2(ITERS+1)-1:0] n;

  // Leading-one position of |x|.
  logic [4:0] lead;
  always_comb begin
    lead = '0;
    for (int i = 0; i < QW; i++)
      if (xa[i]) lead = 5'(i);
  end

  // Step products, wide enough for the full precision.
  logic [ZW+QW-1:0] p1;
  logic [2*ZW-1:0]  p2;
  always_comb begin
    p1 = (ZW+QW)'(xa) * (ZW+QW)'(z);   // QF + IFRAC fraction bits
    p2 = (2*ZW)'(z) * (2*ZW)'(tcorr);  // 2*IFRAC fraction bits
  end

  // Rounded and saturated result.
  logic [ZW-1:0] zr;
  q_t            qn;
  always_comb begin
    zr = (z + ZW'(1 << (IFRAC - QF - 1))) >> (IFRAC - QF);
    if (zero || zr > ZW'(Q_MAX)) qn = Q_MAX;
    else                         qn = q_t'(zr);
    if (neg && !zero)            qn = -qn;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      xa    <= '0;
      neg   <= 1'b0;
      zero  <= 1'b0;
      z     <= '0;
      tcorr <= '0;
      n     <= '0;
      done  <= 1'b0;
      q     <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          neg   <= x[QW-1];
          xa    <= x[QW-1] ? QW'(-x) : QW'(x);
          zero  <= (x == '0);
          state <= S_GUESS;
        end
        S_GUESS: begin
          // |x| in [2^(lead-16), 2^(lead-15)) -> z0 = 2^(15-lead)
          z     <= ZW'(1) << (IFRAC + QF - 1 - 32'(lead));
          n     <= '0;
          state <= (ITERS == 0) ? S_ROUND : S_MUL1;
        end
        S_MUL1: begin
          tcorr <= (ZW'(2) << IFRAC) - ZW'(p1 >> QF);
          state <= S_MUL2;
        end
        S_MUL2: begin
          z     <= ZW'(p2 >> IFRAC);
          n     <= n + 1'b1;
          state <= (32'(n) + 1 == ITERS) ? S_ROUND : S_MUL1;
        end
        S_ROUND: begin
          q     <= qn;
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

endmodule
