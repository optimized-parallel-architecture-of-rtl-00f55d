// kf_predict: prediction step of a constant-velocity Kalman filter along one
// axis, for one assumed direction of motion.
//
// State (p, s): position and speed along the axis. The direction input picks
// the transition matrix A = [1 t; 0 1] with t = +dt (DIR_POS) or t = -dt
// (DIR_NEG), so
//   p' = p + t*s,  s' = s
//   P' = A P A^T + Q:
//     P'00 = P00 + 2 t P01 + t^2 P11 + Q00
//     P'01 = P01 + t P11 + Q01
//     P'11 = P11 + Q11
// These are the article's prediction equations x' = A x and P' = A P A^T + Q;
// the constant-velocity form of A and the direction-signed time step are this
// design's reading of its "x+v / x-v" block operations.
//
// Arithmetic: W = INT_BITS + FRAC_BITS bit two's-complement fixed point; a
// product is the full product shifted right by FRAC_BITS (truncation toward
// minus infinity) and cut to W bits, with no saturation.
//
// Timing: one register stage. When en is high the inputs are taken and the
// results appear on the outputs, with out_valid = in_valid, on the next
// clock. When en is low every register holds (pipeline stall).
module kf_predict
  import kf_pkg::*;
#(
  parameter int INT_BITS  = KF_INT_BITS,
  parameter int FRAC_BITS = KF_FRAC_BITS,
  localparam int W = INT_BITS + FRAC_BITS
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic                in_valid,
  input  dir_e                dir,
  input  logic signed [W-1:0] dt,
  input  logic signed [W-1:0] q00,
  input  logic signed [W-1:0] q01,
  input  logic signed [W-1:0] q11,
  input  logic signed [W-1:0] p,
  input  logic signed [W-1:0] s,
  input  logic signed [W-1:0] c00,
  input  logic signed [W-1:0] c01,
  input  logic signed [W-1:0] c11,
  output logic                out_valid,
  output logic signed [W-1:0] pp,
  output logic signed [W-1:0] sp,
  output logic signed [W-1:0] cp00,
  output logic signed [W-1:0] cp01,
  output logic signed [W-1:0] cp11
);

  function automatic logic signed [W-1:0] fmul(logic signed [W-1:0] a,
                                               logic signed [W-1:0] b);
    logic signed [2*W-1:0] prod;
    prod = a * b;
    return W'(prod >>> FRAC_BITS);
  endfunction

  logic signed [W-1:0] t, tt, t_c01, t_c11, tt_c11;
  logic signed [W-1:0] n_p, n_c00, n_c01, n_c11;

  always_comb begin
    t      = (dir == DIR_POS) ? dt : -dt;
    tt     = fmul(dt, dt);
    t_c01  = fmul(t, c01);
    t_c11  = fmul(t, c11);
    tt_c11 = fmul(tt, c11);
    n_p    = p + fmul(t, s);
    n_c00  = c00 + (t_c01 <<< 1) + tt_c11 + q00;
    n_c01  = c01 + t_c11 + q01;
    n_c11  = c11 + q11;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      pp        <= '0;
      sp        <= '0;
      cp00      <= '0;
      cp01      <= '0;
      cp11      <= '0;
    end else if (en) begin
      out_valid <= in_valid;
      pp        <= n_p;
      sp        <= s;
      cp00      <= n_c00;
      cp01      <= n_c01;
      cp11      <= n_c11;
    end
  end

endmodule
