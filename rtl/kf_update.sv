// kf_update: measurement update of one axis of the Kalman filter.
//
// With the position-only measurement z (H = [1 0]) and the gain K = (K0, K1):
//   e  = z - p'                      (innovation)
//   p  = p' + K0 e,   s = s' + K1 e
//   P  = (I - K H) P' (I - K H)^T + K R K^T   (Joseph form), written out:
//     P00 = (1-K0)^2 P'00 + K0^2 R
//     P01 = (1-K0) (P'01 - K1 P'00) + K0 K1 R
//     P11 = K1^2 P'00 - 2 K1 P'01 + P'11 + K1^2 R
// The equations are the article's update equations; the Joseph form is the
// one it prints. When has_meas is low (no measurement was associated) the
// predicted state and covariance are passed through unchanged; that coasting
// rule is this design's choice.
//
// Fixed point as in kf_predict (truncating products, no saturation).
// Timing: two register stages, latency 2 enabled clocks, initiation interval
// 1. en low stalls both stages.
module kf_update
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
  input  logic                has_meas,
  input  logic signed [W-1:0] r_meas,
  input  logic signed [W-1:0] z,
  input  logic signed [W-1:0] pp,
  input  logic signed [W-1:0] sp,
  input  logic signed [W-1:0] cp00,
  input  logic signed [W-1:0] cp01,
  input  logic signed [W-1:0] cp11,
  input  logic signed [W-1:0] k0,
  input  logic signed [W-1:0] k1,
  output logic                out_valid,
  output logic signed [W-1:0] p,
  output logic signed [W-1:0] s,
  output logic signed [W-1:0] c00,
  output logic signed [W-1:0] c01,
  output logic signed [W-1:0] c11
);

  localparam logic signed [W-1:0] ONE = W'(1) <<< FRAC_BITS;

  function automatic logic signed [W-1:0] fmul(logic signed [W-1:0] a,
                                               logic signed [W-1:0] b);
    logic signed [2*W-1:0] prod;
    prod = a * b;
    return W'(prod >>> FRAC_BITS);
  endfunction

  // Stage A registers.
  logic                a_valid, a_meas;
  logic signed [W-1:0] a_p, a_s, a_om, a_aa, a_k0k0, a_k0k1, a_k1k1, a_m;
  logic signed [W-1:0] a_k1c01, a_c00, a_c01, a_c11, a_r;

  logic signed [W-1:0] e, om;   // innovation, 1 - K0
  assign e  = z - pp;
  assign om = ONE - k0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_valid <= 1'b0;
      a_meas  <= 1'b0;
      a_p     <= '0;
      a_s     <= '0;
      a_om    <= '0;
      a_aa    <= '0;
      a_k0k0  <= '0;
      a_k0k1  <= '0;
      a_k1k1  <= '0;
      a_m     <= '0;
      a_k1c01 <= '0;
      a_c00   <= '0;
      a_c01   <= '0;
      a_c11   <= '0;
      a_r     <= '0;
    end else if (en) begin
      a_valid <= in_valid;
      a_meas  <= has_meas;
      a_p     <= has_meas ? pp + fmul(k0, e) : pp;
      a_s     <= has_meas ? sp + fmul(k1, e) : sp;
      a_om    <= om;
      a_aa    <= fmul(om, om);
      a_k0k0  <= fmul(k0, k0);
      a_k0k1  <= fmul(k0, k1);
      a_k1k1  <= fmul(k1, k1);
      a_m     <= cp01 - fmul(k1, cp00);
      a_k1c01 <= fmul(k1, cp01);
      a_c00   <= cp00;
      a_c01   <= cp01;
      a_c11   <= cp11;
      a_r     <= r_meas;
    end
  end

  // Stage B: covariance.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      p         <= '0;
      s         <= '0;
      c00       <= '0;
      c01       <= '0;
      c11       <= '0;
    end else if (en) begin
      out_valid <= a_valid;
      p         <= a_p;
      s         <= a_s;
      if (a_meas) begin
        c00 <= fmul(a_aa, a_c00) + fmul(a_k0k0, a_r);
        c01 <= fmul(a_om, a_m) + fmul(a_k0k1, a_r);
        c11 <= fmul(a_k1k1, a_c00) - (a_k1c01 <<< 1) + a_c11 + fmul(a_k1k1, a_r);
      end else begin
        c00 <= a_c00;
        c01 <= a_c01;
        c11 <= a_c11;
      end
    end
  end

endmodule
