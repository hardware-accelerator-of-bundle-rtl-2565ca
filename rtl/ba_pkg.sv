// ba_pkg: shared number format and types of the bundle-adjustment
// Jacobian-update / cost-calculation accelerator.
//
// Every datapath value is a 20-bit fixed-point number with 16 fractional
// bits, called Q4.16 here: 1 sign bit, 3 integer bits, 16 fraction bits,
// range [-8, 8). The 20-bit width and the 16 fraction bits follow the
// original design; the encoding is two's complement, which is this
// design's choice (the sign/integer/fraction split could also be read as
// sign-magnitude, but two's complement is what the DSP multipliers and
// carry-chain adders use natively).
//
// The helper functions give the arithmetic of the adders and multipliers:
// results that leave the Q4.16 range saturate to the nearest end of the
// range, and products are rounded to nearest (ties toward +infinity).
// Saturation and rounding are this design's choices.
package ba_pkg;

  localparam int unsigned QW = 20;  // total width
  localparam int unsigned QF = 16;  // fraction bits

  typedef logic signed [QW-1:0] q_t;

  localparam q_t Q_MAX = q_t'({1'b0, {(QW-1){1'b1}}});
  localparam q_t Q_MIN = q_t'({1'b1, {(QW-1){1'b0}}});
  localparam q_t Q_ONE = q_t'(1 << QF);

  // Clamp a wide signed value to the Q4.16 range.
  function automatic q_t q_sat(input logic signed [63:0] v);
    if (v > 64'(signed'(Q_MAX)))      return Q_MAX;
    else if (v < 64'(signed'(Q_MIN))) return Q_MIN;
    else                              return q_t'(v);
  endfunction

  function automatic q_t q_add(input q_t a, input q_t b);
    return q_sat(64'(a) + 64'(b));
  endfunction

  function automatic q_t q_sub(input q_t a, input q_t b);
    return q_sat(64'(a) - 64'(b));
  endfunction

  function automatic q_t q_neg(input q_t a);
    return q_sat(-64'(a));
  endfunction

  // Q4.16 x Q4.16 -> Q4.16, rounded to nearest, saturated.
  function automatic q_t q_mul(input q_t a, input q_t b);
    logic signed [63:0] p;
    p = 64'(a) * 64'(b);
    p = p + 64'(1 << (QF - 1));
    return q_sat(p >>> QF);
  endfunction

  // One 3x3 rotation matrix, row-major: r[row][col].
  typedef q_t mat3_t [3][3];
  typedef q_t vec3_t [3];

  // Camera pose: rotation R and translation t (Eq. 3.9/3.10).
  typedef struct packed {
    q_t [2:0][2:0] r;
    q_t [2:0]      t;
  } cam_t;

  // 3D point [X Y Z].
  typedef struct packed {
    q_t [2:0] p;
  } point_t;

  // Jacobian block of one observation: two rows (U, V) and nine columns in
  // the order [X Y Z w1 w2 w3 t1 t2 t3] (Eq. 3.8).
  typedef q_t [1:0][8:0] jac_t;

endpackage
