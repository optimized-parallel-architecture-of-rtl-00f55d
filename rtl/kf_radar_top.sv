// kf_radar_top: multi-target radar tracking Kalman filter, FPGA system level.
//
// A frame is processed in three steps, sequenced by a small state machine:
//   1. Load  (first stage): the DMA copies the frame's measurements, and, if
//      load_tracks is set, the initial track states, from external memory
//      into on-chip RAM (measurement RAM and track latch).
//   2. Filter (second stage): kf_core predicts every track four ways (x and
//      y, each moving in both directions), computes covariances and gains,
//      associates each track with its nearest measurement, updates it and
//      writes it back to the track latch.
//   3. Store: the DMA writes the updated track records to external memory at
//      res_base.
// With load_tracks clear the tracks left in the latch by the previous frame
// are filtered again, so consecutive frames run without reloading them.
//
// Interface: configure the inputs, pulse start for one clock; busy is high
// until done pulses. frame_cycles is the number of clocks from start to done
// of the last frame. The external memory is a word-addressed port (see
// kf_dma) to be connected to a memory controller. Numbers are signed fixed
// point with INT_BITS integer and FRAC_BITS fraction bits (defaults 10/20,
// the high-precision format; 8/12 is the medium-precision one). MAX_TRACKS and
// MAX_MEAS set the RAM sizes (100 each, the largest target count evaluated).
// The three-step structure follows the article; the control interface,
// the memory port and the frame sequencing details are this design's.
module kf_radar_top
  import kf_pkg::*;
#(
  parameter int INT_BITS   = KF_INT_BITS,
  parameter int FRAC_BITS  = KF_FRAC_BITS,
  parameter int MAX_TRACKS = 100,
  parameter int MAX_MEAS   = 100,
  parameter int ADDR_W     = 24,
  localparam int W   = INT_BITS + FRAC_BITS,
  localparam int RW  = TRK_WORDS * W,
  localparam int MRW = MEAS_WORDS * W,
  localparam int TAW = (MAX_TRACKS > 1) ? $clog2(MAX_TRACKS) : 1,
  localparam int MAW = (MAX_MEAS > 1) ? $clog2(MAX_MEAS) : 1,
  localparam int TCW = $clog2(MAX_TRACKS + 1),
  localparam int MCW = $clog2(MAX_MEAS + 1)
) (
  input  logic                clk,
  input  logic                rst_n,
  // frame control and filter constants
  input  logic                start,
  input  logic                load_tracks,
  input  logic [TCW-1:0]      n_trk,
  input  logic [MCW-1:0]      n_meas,
  input  logic [ADDR_W-1:0]   trk_base,
  input  logic [ADDR_W-1:0]   meas_base,
  input  logic [ADDR_W-1:0]   res_base,
  input  logic signed [W-1:0] dt,
  input  logic signed [W-1:0] q00,
  input  logic signed [W-1:0] q01,
  input  logic signed [W-1:0] q11,
  input  logic signed [W-1:0] r_meas,
  output logic                busy,
  output logic                done,
  // statistics of the last frame
  output logic [31:0]         frame_cycles,
  output logic [31:0]         stall_cycles,
  output logic [TCW-1:0]      coast_cnt,
  output logic [TCW-1:0]      op_cnt [4],
  // external memory (DDR2 SDRAM controller side)
  output logic                mem_req,
  output logic                mem_we,
  output logic [ADDR_W-1:0]   mem_addr,
  output logic [W-1:0]        mem_wdata,
  input  logic                mem_gnt,
  input  logic                mem_rvalid,
  input  logic [W-1:0]        mem_rdata
);

  typedef enum logic [2:0] {T_IDLE, T_LOAD, T_RUN, T_STORE, T_DONE} tstate_e;
  tstate_e state;

  logic dma_load, dma_store, dma_done;
  logic core_start, core_done;

  // DMA <-> RAMs
  logic           dma_trk_we, dma_trk_rd_en;
  logic [TAW-1:0] dma_trk_waddr, dma_trk_raddr;
  logic [RW-1:0]  dma_trk_wdata, trk_rdata;
  logic           dma_meas_we;
  logic [MAW-1:0] dma_meas_waddr;
  logic [MRW-1:0] dma_meas_wdata;

  // core <-> RAMs
  logic           core_trk_rd_en, core_trk_we, core_meas_rd_en;
  logic [TAW-1:0] core_trk_raddr, core_trk_waddr;
  logic [RW-1:0]  core_trk_wdata;
  logic [MAW-1:0] core_meas_raddr;
  logic [MRW-1:0] meas_rdata;
  logic           core_busy, dma_busy;

  kf_dma #(
    .INT_BITS(INT_BITS), .FRAC_BITS(FRAC_BITS), .MAX_TRACKS(MAX_TRACKS),
    .MAX_MEAS(MAX_MEAS), .ADDR_W(ADDR_W)
  ) u_dma (
    .clk, .rst_n,
    .start_load (dma_load),
    .start_store(dma_store),
    .load_tracks,
    .n_trk, .n_meas, .trk_base, .meas_base, .res_base,
    .busy (dma_busy),
    .done (dma_done),
    .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_gnt, .mem_rvalid, .mem_rdata,
    .trk_we    (dma_trk_we),
    .trk_waddr (dma_trk_waddr),
    .trk_wdata (dma_trk_wdata),
    .trk_rd_en (dma_trk_rd_en),
    .trk_raddr (dma_trk_raddr),
    .trk_rdata (trk_rdata),
    .meas_we   (dma_meas_we),
    .meas_waddr(dma_meas_waddr),
    .meas_wdata(dma_meas_wdata)
  );

  kf_latch #(
    .INT_BITS(INT_BITS), .FRAC_BITS(FRAC_BITS), .MAX_TRACKS(MAX_TRACKS)
  ) u_latch (
    .clk,
    .init_we  (dma_trk_we),
    .init_addr(dma_trk_waddr),
    .init_data(dma_trk_wdata),
    .upd_we   (core_trk_we),
    .upd_addr (core_trk_waddr),
    .upd_data (core_trk_wdata),
    .rd_en    (core_trk_rd_en | dma_trk_rd_en),
    .rd_addr  ((state == T_STORE) ? dma_trk_raddr : core_trk_raddr),
    .rd_data  (trk_rdata)
  );

  bram_sdp #(.WIDTH(MRW), .DEPTH(MAX_MEAS)) u_meas_ram (
    .clk,
    .we     (dma_meas_we),
    .wr_addr(dma_meas_waddr),
    .wr_data(dma_meas_wdata),
    .rd_en  (core_meas_rd_en),
    .rd_addr(core_meas_raddr),
    .rd_data(meas_rdata)
  );

  kf_core #(
    .INT_BITS(INT_BITS), .FRAC_BITS(FRAC_BITS), .MAX_TRACKS(MAX_TRACKS),
    .MAX_MEAS(MAX_MEAS)
  ) u_core (
    .clk, .rst_n,
    .start (core_start),
    .n_trk, .n_meas, .dt, .q00, .q01, .q11, .r_meas,
    .trk_rd_en (core_trk_rd_en),
    .trk_raddr (core_trk_raddr),
    .trk_rdata (trk_rdata),
    .trk_we    (core_trk_we),
    .trk_waddr (core_trk_waddr),
    .trk_wdata (core_trk_wdata),
    .meas_rd_en(core_meas_rd_en),
    .meas_raddr(core_meas_raddr),
    .meas_rdata(meas_rdata),
    .busy (core_busy),
    .done (core_done),
    .stall_cycles,
    .coast_cnt,
    .op_cnt
  );

  assign dma_load   = (state == T_IDLE) && start;
  assign core_start = (state == T_LOAD) && dma_done;
  assign dma_store  = (state == T_RUN) && core_done;
  assign busy       = (state != T_IDLE);

  logic [31:0] cyc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= T_IDLE;
      done         <= 1'b0;
      cyc          <= '0;
      frame_cycles <= '0;
    end else begin
      done <= 1'b0;
      if (state != T_IDLE) cyc <= cyc + 1;
      case (state)
        T_IDLE:  if (start) begin
                   state <= T_LOAD;
                   cyc   <= 32'd1;
                 end
        T_LOAD:  if (dma_done)  state <= T_RUN;
        T_RUN:   if (core_done) state <= T_STORE;
        T_STORE: if (dma_done)  state <= T_DONE;
        T_DONE: begin
          done         <= 1'b1;
          frame_cycles <= cyc;
          state        <= T_IDLE;
        end
        default: state <= T_IDLE;
      endcase
    end
  end

  // The core and the DMA never use the track latch at the same time.
  a_latch_excl: assert property (@(posedge clk) disable iff (!rst_n)
    !(core_busy && dma_busy));

endmodule
