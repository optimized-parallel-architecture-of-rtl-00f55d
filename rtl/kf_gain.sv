// kf_gain: Kalman gain of one axis, K = P' H^T (H P' H^T + R)^-1.
//
// The measurement is the position only, H = [1 0], so the innovation
// covariance is the scalar S = P'00 + R and the gain is the 2-vector
//   K0 = P'00 / S,  K1 = P'01 / S.
// The division is done once, as a reciprocal 1/S in the pipelined divider
// fx_recip, followed by two fixed-point multiplications. The article gives
// the gain equation; the reciprocal-then-multiply structure and the
// fixed-point details are this design's choices.
//
// Timing: fully pipelined, one new operand set per enabled clock.
// Latency 2*FRAC_BITS + 3 enabled clocks: one stage forms S, the
// divider takes 2*FRAC_BITS+1, one stage multiplies. en low stalls all
// stages.
module kf_gain
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
  input  logic signed [W-1:0] r_meas,   // measurement noise variance R
  input  logic signed [W-1:0] cp00,     // predicted covariance P'00
  input  logic signed [W-1:0] cp01,     // predicted covariance P'01
  output logic                out_valid,
  output logic signed [W-1:0] k0,
  output logic signed [W-1:0] k1
);

  localparam int NB = 2 * FRAC_BITS + 1;

  function automatic logic signed [W-1:0] fmul(logic signed [W-1:0] a,
                                               logic signed [W-1:0] b);
    logic signed [2*W-1:0] prod;
    prod = a * b;
    return W'(prod >>> FRAC_BITS);
  endfunction

  // Stage 1: innovation covariance.
  logic                s_valid;
  logic signed [W-1:0] s_val, s_c00, s_c01;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_valid <= 1'b0;
      s_val   <= '0;
      s_c00   <= '0;
      s_c01   <= '0;
    end else if (en) begin
      s_valid <= in_valid;
      s_val   <= cp00 + r_meas;
      s_c00   <= cp00;
      s_c01   <= cp01;
    end
  end

  // Divider, with the numerators carried alongside.
  logic                d_valid;
  logic signed [W-1:0] recip;
  logic [2*W-1:0]      d_c;

  fx_recip #(.INT_BITS(INT_BITS), .FRAC_BITS(FRAC_BITS)) u_recip (
    .clk, .rst_n, .en,
    .in_valid (s_valid),
    .d        (s_val),
    .out_valid(d_valid),
    .r        (recip)
  );

  pipe_delay #(.WIDTH(2 * W), .DEPTH(NB)) u_dly (
    .clk, .rst_n, .en,
    .d ({s_c00, s_c01}),
    .q (d_c)
  );

  // Last stage: multiply by the reciprocal.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      k0        <= '0;
      k1        <= '0;
    end else if (en) begin
      out_valid <= d_valid;
      k0        <= fmul(signed'(d_c[2*W-1:W]), recip);
      k1        <= fmul(signed'(d_c[W-1:0]), recip);
    end
  end

endmodule
