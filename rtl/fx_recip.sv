// fx_recip: fully pipelined fixed-point reciprocal, r = 1/d.
//
// With d and r in fixed point with FRAC_BITS fraction bits, the integer
// result is floor(2^(2*FRAC_BITS) / d). It is computed by restoring division,
// one quotient bit per register stage, so a new operand can enter on every
// enabled clock (initiation interval 1). The numerator has NB = 2*FRAC_BITS+1
// bits, hence NB stages; the latency is NB enabled clocks.
// A quotient that does not fit in W bits as a positive number, and any d <= 0,
// give the largest positive W-bit number (saturation).
//
// en stalls every stage. in_valid travels with the data to out_valid.
// The article does not say how the gain's inverse is formed; this divider
// is this design's choice.
module fx_recip #(
  parameter int INT_BITS  = 10,
  parameter int FRAC_BITS = 20,
  localparam int W  = INT_BITS + FRAC_BITS,
  localparam int NB = 2 * FRAC_BITS + 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic                in_valid,
  input  logic signed [W-1:0] d,
  output logic                out_valid,
  output logic signed [W-1:0] r
);

  localparam logic [NB-1:0] NUM = NB'(1) << (2 * FRAC_BITS);
  localparam logic [NB-1:0] QMAX = NB'({1'b0, {(W-1){1'b1}}});

  // Per stage: divisor, partial remainder, quotient bits so far, flags.
  logic [W-1:0]  den [NB];
  logic [W:0]    rem [NB];
  logic [NB-1:0] quo [NB];
  logic          bad [NB];
  logic          vld [NB];

  // Shifted partial remainder entering each stage.
  logic [W+1:0] sh [NB];

  always_comb begin
    sh[0] = {{(W+1){1'b0}}, NUM[NB-1]};
    for (int i = 1; i < NB; i++) sh[i] = {rem[i-1], NUM[NB-1-i]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NB; i++) begin
        den[i] <= '0;
        rem[i] <= '0;
        quo[i] <= '0;
        bad[i] <= 1'b0;
        vld[i] <= 1'b0;
      end
    end else if (en) begin
      // Stage 0 takes numerator bit NB-1.
      den[0] <= d;
      bad[0] <= (d <= 0);
      vld[0] <= in_valid;
      if (d > 0 && sh[0] >= {2'b00, d}) begin
        rem[0] <= (W+1)'(sh[0] - {2'b00, d});
        quo[0] <= NB'(1);
      end else begin
        rem[0] <= sh[0][W:0];
        quo[0] <= '0;
      end
      for (int i = 1; i < NB; i++) begin
        den[i] <= den[i-1];
        bad[i] <= bad[i-1];
        vld[i] <= vld[i-1];
        if (sh[i] >= {2'b00, den[i-1]}) begin
          rem[i] <= (W+1)'(sh[i] - {2'b00, den[i-1]});
          quo[i] <= {quo[i-1][NB-2:0], 1'b1};
        end else begin
          rem[i] <= sh[i][W:0];
          quo[i] <= {quo[i-1][NB-2:0], 1'b0};
        end
      end
    end
  end

  assign out_valid = vld[NB-1];
  assign r = (bad[NB-1] || quo[NB-1] > QMAX) ? signed'(W'(QMAX))
                                             : signed'(W'(quo[NB-1]));

endmodule
