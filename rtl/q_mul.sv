// q_mul: one Q4.16 multiplier with a registered output, the unit that maps
// onto an FPGA DSP multiplier. The original design asks for multiplications
// that finish in one clock cycle; this is that unit.
//
// Interface: a and b are sampled with en; p = round(a*b) saturated to Q4.16
// is valid one cycle later. Rounding to nearest and saturation are this
// design's choices. Reset clears the output register.
module q_mul
  import ba_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  q_t   a,
  input  q_t   b,
  output q_t   p
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  p <= '0;
    else if (en) p <= ba_pkg::q_mul(a, b);
  end
endmodule
