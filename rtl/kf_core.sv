// kf_core: the filter's second stage, run once per radar frame.
//
// For every track it runs the four block operations of the design in
// parallel: the x axis predicted with negative and with positive motion, and
// the y axis likewise (four kf_predict and four kf_gain units). The
// nearest-neighbour unit nn_assoc then matches the four combined predictions
// (x-v,y+v), (x-v,y-v), (x+v,y+v), (x+v,y-v) against the frame's
// measurements; the winning x and y hypotheses are updated with the chosen
// measurement by two kf_update units, and the result is written back to the
// track latch in place of the old record.
//
// Dataflow: tracks are read from the latch back to back and go through
// prediction and gain in a pipeline with initiation interval 1 (the gain of
// a track is computed while an earlier track is being associated). A
// one-entry hand-off at the end of that pipeline feeds nn_assoc; while the
// association unit is busy the whole front pipeline stalls (fe_en low).
// Association takes n_meas + 4 clocks per track and sets the throughput;
// update takes 2 clocks and never stalls.
//
// Interface: start (one clock) begins a frame over tracks 0..n_trk-1 using
// measurements 0..n_meas-1; done pulses one clock after the last record is
// written. Latch and measurement RAM read ports have one clock of latency.
// Statistics are cleared at start: stall_cycles counts clocks in which a
// gain result waited for the association unit, coast_cnt tracks without a
// measurement, op_cnt[i] the tracks whose winning block operation was i.
// The four block operations, the step order and the parallel gain follow the
// article; the pipeline depths and the hand-off are this design's choices.
module kf_core
  import kf_pkg::*;
#(
  parameter int INT_BITS   = KF_INT_BITS,
  parameter int FRAC_BITS  = KF_FRAC_BITS,
  parameter int MAX_TRACKS = 100,
  parameter int MAX_MEAS   = 100,
  localparam int W   = INT_BITS + FRAC_BITS,
  localparam int RW  = TRK_WORDS * W,
  localparam int TAW = (MAX_TRACKS > 1) ? $clog2(MAX_TRACKS) : 1,
  localparam int MAW = (MAX_MEAS > 1) ? $clog2(MAX_MEAS) : 1,
  localparam int TCW = $clog2(MAX_TRACKS + 1),
  localparam int MCW = $clog2(MAX_MEAS + 1)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic [TCW-1:0]      n_trk,
  input  logic [MCW-1:0]      n_meas,
  input  logic signed [W-1:0] dt,
  input  logic signed [W-1:0] q00,
  input  logic signed [W-1:0] q01,
  input  logic signed [W-1:0] q11,
  input  logic signed [W-1:0] r_meas,
  // track latch
  output logic                trk_rd_en,
  output logic [TAW-1:0]      trk_raddr,
  input  logic [RW-1:0]       trk_rdata,
  output logic                trk_we,
  output logic [TAW-1:0]      trk_waddr,
  output logic [RW-1:0]       trk_wdata,
  // measurement RAM
  output logic                meas_rd_en,
  output logic [MAW-1:0]      meas_raddr,
  input  logic [MEAS_WORDS*W-1:0] meas_rdata,
  // status
  output logic                busy,
  output logic                done,
  output logic [31:0]         stall_cycles,
  output logic [TCW-1:0]      coast_cnt,
  output logic [TCW-1:0]      op_cnt [4]
);

  localparam int LG  = 2 * FRAC_BITS + 3;   // kf_gain latency
  localparam int HW  = 7 * W;               // one hypothesis: pp sp c00 c01 c11 k0 k1
  localparam int PLW = 4 * HW + TAW;        // association payload

  // Hypothesis order inside the core.
  localparam int H_XN = 0, H_XP = 1, H_YN = 2, H_YP = 3;

  logic running;
  logic [TCW-1:0] issue_idx, wr_cnt;

  // ---------------- front pipeline: read, predict, gain ----------------
  logic fe_en, fe_out_valid, as_in_ready, issue;

  assign fe_en     = !fe_out_valid || as_in_ready;
  assign issue     = running && (issue_idx < n_trk) && fe_en;
  assign trk_rd_en = issue;
  assign trk_raddr = TAW'(issue_idx);

  logic           v0;
  logic [TAW-1:0] idx0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v0   <= 1'b0;
      idx0 <= '0;
    end else if (fe_en) begin
      v0   <= issue;
      idx0 <= TAW'(issue_idx);
    end
  end

  function automatic logic signed [W-1:0] fld(logic [RW-1:0] rec, int f);
    return signed'(rec[f*W +: W]);
  endfunction

  logic signed [W-1:0] pr_p [4], pr_s [4], pr_c00 [4], pr_c01 [4], pr_c11 [4];
  logic signed [W-1:0] g_k0 [4], g_k1 [4];
  logic                pr_v [4], g_v [4];
  logic [4*5*W-1:0]    pr_bundle, pr_dly;
  logic [TAW-1:0]      idx_g;

  for (genvar h = 0; h < 4; h++) begin : g_hyp
    localparam bit   IS_Y = (h >= 2);
    localparam dir_e DIR  = (h == H_XP || h == H_YP) ? DIR_POS : DIR_NEG;

    kf_predict #(.INT_BITS(INT_BITS), .FRAC_BITS(FRAC_BITS)) u_pred (
      .clk, .rst_n, .en(fe_en), .in_valid(v0), .dir(DIR),
      .dt, .q00, .q01, .q11,
      .p  (fld(trk_rdata, IS_Y ? F_PY   : F_PX)),
      .s  (fld(trk_rdata, IS_Y ? F_SY   : F_SX)),
      .c00(fld(trk_rdata, IS_Y ? F_PY00 : F_PX00)),
      .c01(fld(trk_rdata, IS_Y ? F_PY01 : F_PX01)),
      .c11(fld(trk_rdata, IS_Y ? F_PY11 : F_PX11)),
      .out_valid(pr_v[h]),
      .pp(pr_p[h]), .sp(pr_s[h]), .cp00(pr_c00[h]), .cp01(pr_c01[h]),
      .cp11(pr_c11[h])
    );

    kf_gain #(.INT_BITS(INT_BITS), .FRAC_BITS(FRAC_BITS)) u_gain (
      .clk, .rst_n, .en(fe_en), .in_valid(pr_v[h]), .r_meas,
      .cp00(pr_c00[h]), .cp01(pr_c01[h]),
      .out_valid(g_v[h]), .k0(g_k0[h]), .k1(g_k1[h])
    );

    assign pr_bundle[h*5*W +: 5*W] = {pr_p[h], pr_s[h], pr_c00[h], pr_c01[h], pr_c11[h]};
  end

  // Predicted states wait for their gains.
  pipe_delay #(.WIDTH(4 * 5 * W), .DEPTH(LG)) u_pr_dly (
    .clk, .rst_n, .en(fe_en), .d(pr_bundle), .q(pr_dly)
  );
  pipe_delay #(.WIDTH(TAW), .DEPTH(LG + 1)) u_idx_dly (
    .clk, .rst_n, .en(fe_en), .d(idx0), .q(idx_g)
  );

  assign fe_out_valid = g_v[0];

  logic [PLW-1:0] fe_payload;
  logic signed [W-1:0] hp [4];
  always_comb begin
    fe_payload[TAW-1:0] = idx_g;
    for (int h = 0; h < 4; h++) begin
      fe_payload[TAW + h*HW +: HW] = {pr_dly[h*5*W +: 5*W], g_k0[h], g_k1[h]};
      hp[h] = signed'(pr_dly[h*5*W + 4*W +: W]);
    end
  end

  // ---------------- association ----------------
  logic                as_out_valid, as_has_meas;
  blockop_e            as_op;
  logic [MCW-1:0]      as_midx;
  logic signed [W-1:0] as_zx, as_zy;
  logic [PLW-1:0]      as_payload;
  logic [MCW-1:0]      meas_raddr_w;

  assign meas_raddr = MAW'(meas_raddr_w);

  nn_assoc #(
    .INT_BITS(INT_BITS), .FRAC_BITS(FRAC_BITS), .MAX_MEAS(MAX_MEAS),
    .PAYLOAD_W(PLW)
  ) u_assoc (
    .clk, .rst_n, .n_meas,
    .in_valid (fe_out_valid),
    .in_ready (as_in_ready),
    .xp_neg   (hp[H_XN]),
    .xp_pos   (hp[H_XP]),
    .yp_neg   (hp[H_YN]),
    .yp_pos   (hp[H_YP]),
    .payload  (fe_payload),
    .meas_rd_en,
    .meas_rd_addr(meas_raddr_w),
    .meas_rd_data(meas_rdata),
    .out_valid(as_out_valid),
    .has_meas (as_has_meas),
    .op       (as_op),
    .meas_idx (as_midx),
    .zx       (as_zx),
    .zy       (as_zy),
    .out_payload(as_payload)
  );


  // ---------------- update of the winning hypotheses ----------------
  logic [HW-1:0] hx, hy;
  always_comb begin
    hx = as_payload[TAW + ((op_xdir(as_op) == DIR_POS) ? H_XP : H_XN)*HW +: HW];
    hy = as_payload[TAW + ((op_ydir(as_op) == DIR_POS) ? H_YP : H_YN)*HW +: HW];
  end

  logic                ux_v, uy_v;
  logic signed [W-1:0] ux_p, ux_s, ux_c00, ux_c01, ux_c11;
  logic signed [W-1:0] uy_p, uy_s, uy_c00, uy_c01, uy_c11;

  kf_update #(.INT_BITS(INT_BITS), .FRAC_BITS(FRAC_BITS)) u_upd_x (
    .clk, .rst_n, .en(1'b1), .in_valid(as_out_valid), .has_meas(as_has_meas),
    .r_meas, .z(as_zx),
    .pp(hx[6*W +: W]), .sp(hx[5*W +: W]), .cp00(hx[4*W +: W]),
    .cp01(hx[3*W +: W]), .cp11(hx[2*W +: W]), .k0(hx[W +: W]), .k1(hx[0 +: W]),
    .out_valid(ux_v), .p(ux_p), .s(ux_s), .c00(ux_c00), .c01(ux_c01), .c11(ux_c11)
  );

  kf_update #(.INT_BITS(INT_BITS), .FRAC_BITS(FRAC_BITS)) u_upd_y (
    .clk, .rst_n, .en(1'b1), .in_valid(as_out_valid), .has_meas(as_has_meas),
    .r_meas, .z(as_zy),
    .pp(hy[6*W +: W]), .sp(hy[5*W +: W]), .cp00(hy[4*W +: W]),
    .cp01(hy[3*W +: W]), .cp11(hy[2*W +: W]), .k0(hy[W +: W]), .k1(hy[0 +: W]),
    .out_valid(uy_v), .p(uy_p), .s(uy_s), .c00(uy_c00), .c01(uy_c01), .c11(uy_c11)
  );

  // Track index and info word travel with the update.
  logic [W-1:0]   info_in, info_out;
  logic [TAW-1:0] idx_u;
  assign info_in = W'({as_midx, as_has_meas, as_op});

  pipe_delay #(.WIDTH(TAW + W), .DEPTH(2)) u_upd_dly (
    .clk, .rst_n, .en(1'b1),
    .d({as_payload[TAW-1:0], info_in}), .q({idx_u, info_out})
  );

  always_comb begin
    trk_we    = ux_v;
    trk_waddr = idx_u;
    trk_wdata = '0;
    trk_wdata[F_PX*W   +: W] = ux_p;
    trk_wdata[F_SX*W   +: W] = ux_s;
    trk_wdata[F_PX00*W +: W] = ux_c00;
    trk_wdata[F_PX01*W +: W] = ux_c01;
    trk_wdata[F_PX11*W +: W] = ux_c11;
    trk_wdata[F_PY*W   +: W] = uy_p;
    trk_wdata[F_SY*W   +: W] = uy_s;
    trk_wdata[F_PY00*W +: W] = uy_c00;
    trk_wdata[F_PY01*W +: W] = uy_c01;
    trk_wdata[F_PY11*W +: W] = uy_c11;
    trk_wdata[F_INFO*W +: W] = info_out;
  end

  // ---------------- control and statistics ----------------
  assign busy = running;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running      <= 1'b0;
      issue_idx    <= '0;
      wr_cnt       <= '0;
      done         <= 1'b0;
      stall_cycles <= '0;
      coast_cnt    <= '0;
      for (int i = 0; i < 4; i++) op_cnt[i] <= '0;
    end else begin
      done <= 1'b0;
      if (start && !running) begin
        running      <= 1'b1;
        issue_idx    <= '0;
        wr_cnt       <= '0;
        stall_cycles <= '0;
        coast_cnt    <= '0;
        for (int i = 0; i < 4; i++) op_cnt[i] <= '0;
      end else if (running) begin
        if (issue) issue_idx <= issue_idx + 1'b1;
        if (fe_out_valid && !as_in_ready) stall_cycles <= stall_cycles + 1;
        if (as_out_valid) begin
          if (as_has_meas) op_cnt[as_op] <= op_cnt[as_op] + 1'b1;
          else             coast_cnt <= coast_cnt + 1'b1;
        end
        if (trk_we) wr_cnt <= wr_cnt + 1'b1;
        if ((trk_we ? wr_cnt + 1'b1 : wr_cnt) == n_trk) begin
          running <= 1'b0;
          done    <= 1'b1;
        end
      end
    end
  end

  // Every written record belongs to a track of this frame.
  a_wr_in_range: assert property (@(posedge clk) disable iff (!rst_n)
    trk_we |-> (TCW'(trk_waddr) < n_trk));
  // The update units work in lock step.
  a_upd_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
    ux_v == uy_v);

endmodule
