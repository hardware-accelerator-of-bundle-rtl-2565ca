// pre_s3: the "preS3" stage. It forms once the products of 1/z* that the
// eighteen derivatives share, instead of multiplying them out in every
// derivative: a = x*/z*, b = y*/z*, c = x*/z*^2, d = y*/z*^2 (the shared
// terms the original design names), and the three squares and cross product
// a*b = x*y*/z*^2, a*a = x*^2/z*^2, b*b = y*^2/z*^2 that the rotation
// columns use (this design's addition to the stage, since they are built
// from a and b the same way).
//
// Timing: two multiplier levels. On the edge that samples in_valid, a and b
// are formed; on the next edge c = a*(1/z*), d = b*(1/z*) and the three
// products. out_valid is high in the cycle after (latency 2). iz must hold
// for both cycles. a and b are also the projected image position (U, V) of
// Eq. 3.11 used by the cost calculation.
module pre_s3
  import ba_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  q_t   xs,
  input  q_t   ys,
  input  q_t   iz,
  output logic out_valid,
  output q_t   a,
  output q_t   b,
  output q_t   c,
  output q_t   d,
  output q_t   ab,
  output q_t   aa,
  output q_t   bb
);
  logic ph1;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph1       <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      ph1       <= in_valid;
      out_valid <= ph1;
    end
  end

  q_mul u_a  (.clk, .rst_n, .en(in_valid), .a(xs), .b(iz), .p(a));
  q_mul u_b  (.clk, .rst_n, .en(in_valid), .a(ys), .b(iz), .p(b));
  q_mul u_c  (.clk, .rst_n, .en(ph1),      .a(a),  .b(iz), .p(c));
  q_mul u_d  (.clk, .rst_n, .en(ph1),      .a(b),  .b(iz), .p(d));
  q_mul u_ab (.clk, .rst_n, .en(ph1),      .a(a),  .b(b),  .p(ab));
  q_mul u_aa (.clk, .rst_n, .en(ph1),      .a(a),  .b(a),  .p(aa));
  q_mul u_bb (.clk, .rst_n, .en(ph1),      .a(b),  .b(b),  .p(bb));
endmodule
