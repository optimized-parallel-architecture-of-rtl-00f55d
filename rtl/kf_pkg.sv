// kf_pkg: constants and small types shared by the radar Kalman filter.
//
// Numbers are two's-complement fixed point with KF_INT_BITS integer bits
// (sign included) and KF_FRAC_BITS fraction bits. The defaults are the
// high-precision format of the design (10 integer, 20 fraction bits); the
// medium-precision format (8 integer, 12 fraction bits) is obtained by
// overriding the INT_BITS/FRAC_BITS parameters of the modules.
//
// A track record is TRK_WORDS words of one number each, in this order:
//   0 px  1 sx  2 Px00  3 Px01  4 Px11  5 py  6 sy  7 Py00  8 Py01  9 Py11
//  10 info (bits [1:0] block operation chosen last frame, bit 2 "had a
//           measurement", bits above: index of the measurement used)
// px/py are positions, sx/sy speeds along the axis, P the 2x2 symmetric
// covariance of (position, speed) of that axis. A measurement record is
// two words: zx, zy.
// The two number formats are the article's; the record layout and the
// encodings are this design's choices.
package kf_pkg;

  localparam int KF_INT_BITS  = 10;
  localparam int KF_FRAC_BITS = 20;

  localparam int TRK_WORDS  = 11;
  localparam int MEAS_WORDS = 2;

  // Field indices inside a track record.
  localparam int F_PX = 0, F_SX = 1, F_PX00 = 2, F_PX01 = 3, F_PX11 = 4;
  localparam int F_PY = 5, F_SY = 6, F_PY00 = 7, F_PY01 = 8, F_PY11 = 9;
  localparam int F_INFO = 10;

  // Direction of motion along one axis.
  typedef enum logic {
    DIR_NEG = 1'b0,   // position decreases: p' = p - s*T
    DIR_POS = 1'b1    // position increases: p' = p + s*T
  } dir_e;

  // The four block operations: {x direction, y direction}.
  //   OP1 = (x-v, y+v), OP2 = (x-v, y-v), OP3 = (x+v, y+v), OP4 = (x+v, y-v)
  typedef enum logic [1:0] {
    OP1 = 2'd0,
    OP2 = 2'd1,
    OP3 = 2'd2,
    OP4 = 2'd3
  } blockop_e;

  function automatic dir_e op_xdir(blockop_e op);
    return (op == OP3 || op == OP4) ? DIR_POS : DIR_NEG;
  endfunction

  function automatic dir_e op_ydir(blockop_e op);
    return (op == OP1 || op == OP3) ? DIR_POS : DIR_NEG;
  endfunction

endpackage
