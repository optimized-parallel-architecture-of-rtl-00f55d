// nn_assoc: nearest-neighbour data association for one track.
//
// Each track is predicted four ways, one per block operation, by combining
// the x position predicted with negative or positive motion (xp_neg/xp_pos)
// and the y position predicted the same way (yp_neg/yp_pos):
//   OP1 = (xp_neg, yp_pos)  OP2 = (xp_neg, yp_neg)
//   OP3 = (xp_pos, yp_pos)  OP4 = (xp_pos, yp_neg)
// The unit reads the n_meas measurements (zx, zy) of the current frame from
// the measurement memory and returns the pair (block operation, measurement)
// with the smallest squared Euclidean distance. Ties go to the lower
// measurement index, then to the lower block operation. The four distances
// of one measurement are computed in parallel, at full precision.
// Several tracks may pick the same measurement (no exclusive assignment).
// The article names nearest-neighbour association and the four block
// operations; the distance measure, the scan and the tie rules are this
// design's choices.
//
// Interface: a track is taken when in_valid && in_ready; `payload` is stored
// and returned with the result so the caller can carry the rest of the
// track's data through. The memory has one cycle of read latency
// (meas_rd_en/meas_rd_addr -> meas_rd_data on the next clock).
// out_valid is a one-clock pulse; the consumer must take it.
// Timing: out_valid is high n_meas + 4 clocks after the accepting clock
// edge (3 clocks when n_meas = 0, with has_meas = 0); in_ready is high again
// in the same clock as out_valid.
module nn_assoc
  import kf_pkg::*;
#(
  parameter int INT_BITS  = KF_INT_BITS,
  parameter int FRAC_BITS = KF_FRAC_BITS,
  parameter int MAX_MEAS  = 100,
  parameter int PAYLOAD_W = 8,
  localparam int W  = INT_BITS + FRAC_BITS,
  localparam int AW = $clog2(MAX_MEAS + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [AW-1:0]        n_meas,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic signed [W-1:0]  xp_neg,
  input  logic signed [W-1:0]  xp_pos,
  input  logic signed [W-1:0]  yp_neg,
  input  logic signed [W-1:0]  yp_pos,
  input  logic [PAYLOAD_W-1:0] payload,
  output logic                 meas_rd_en,
  output logic [AW-1:0]        meas_rd_addr,
  input  logic [2*W-1:0]       meas_rd_data,   // {zy, zx}: zx in the low word
  output logic                 out_valid,
  output logic                 has_meas,
  output blockop_e             op,
  output logic [AW-1:0]        meas_idx,
  output logic signed [W-1:0]  zx,
  output logic signed [W-1:0]  zy,
  output logic [PAYLOAD_W-1:0] out_payload
);

  localparam int DW = 2 * W + 3;   // width of a squared distance sum

  typedef enum logic [1:0] {S_IDLE, S_SCAN, S_DONE} state_e;
  state_e state;

  logic signed [W-1:0] xn, xq, yn, yq;   // latched predictions
  logic [AW-1:0]       rd_idx;           // next address to read
  logic [AW-1:0]       dat_idx;          // index of data on meas_rd_data
  logic                dat_vld;
  logic [DW-1:0]       best_d;
  logic                found;

  // Distances of the measurement on meas_rd_data to the four predictions.
  logic signed [W-1:0] mzx, mzy;
  logic [DW-1:0]       dsum [4];
  logic [DW-1:0]       cand_d;
  blockop_e            cand_op;

  function automatic logic [DW-1:0] sq(logic signed [W-1:0] a,
                                       logic signed [W-1:0] b);
    logic signed [W:0]     d;
    logic signed [2*W+1:0] p;
    d = {a[W-1], a} - {b[W-1], b};
    p = d * d;
    return DW'(unsigned'(p));
  endfunction

  always_comb begin
    mzx = signed'(meas_rd_data[W-1:0]);
    mzy = signed'(meas_rd_data[2*W-1:W]);
    dsum[OP1] = sq(mzx, xn) + sq(mzy, yq);
    dsum[OP2] = sq(mzx, xn) + sq(mzy, yn);
    dsum[OP3] = sq(mzx, xq) + sq(mzy, yq);
    dsum[OP4] = sq(mzx, xq) + sq(mzy, yn);
    cand_d  = dsum[OP1];
    cand_op = OP1;
    for (int i = 1; i < 4; i++) begin
      if (dsum[i] < cand_d) begin
        cand_d  = dsum[i];
        cand_op = blockop_e'(i);
      end
    end
  end

  assign in_ready     = (state == S_IDLE);
  assign meas_rd_en   = (state == S_SCAN) && (rd_idx < n_meas);
  assign meas_rd_addr = rd_idx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      xn          <= '0;
      xq          <= '0;
      yn          <= '0;
      yq          <= '0;
      rd_idx      <= '0;
      dat_idx     <= '0;
      dat_vld     <= 1'b0;
      best_d      <= '0;
      found       <= 1'b0;
      out_valid   <= 1'b0;
      has_meas    <= 1'b0;
      op          <= OP1;
      meas_idx    <= '0;
      zx          <= '0;
      zy          <= '0;
      out_payload <= '0;
    end else begin
      out_valid <= 1'b0;
      case (state)
        S_IDLE: begin
          if (in_valid) begin
            xn          <= xp_neg;
            xq          <= xp_pos;
            yn          <= yp_neg;
            yq          <= yp_pos;
            out_payload <= payload;
            rd_idx      <= '0;
            dat_vld     <= 1'b0;
            found       <= 1'b0;
            state       <= S_SCAN;
          end
        end
        S_SCAN: begin
          dat_vld <= meas_rd_en;
          dat_idx <= rd_idx;
          if (meas_rd_en) rd_idx <= rd_idx + 1'b1;
          if (dat_vld && (!found || cand_d < best_d)) begin
            found    <= 1'b1;
            best_d   <= cand_d;
            op       <= cand_op;
            meas_idx <= dat_idx;
            zx       <= mzx;
            zy       <= mzy;
          end
          if (!meas_rd_en && !dat_vld) state <= S_DONE;
        end
        S_DONE: begin
          out_valid <= 1'b1;
          has_meas  <= found;
          if (!found) begin
            op       <= OP1;
            meas_idx <= '0;
            zx       <= '0;
            zy       <= '0;
          end
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
