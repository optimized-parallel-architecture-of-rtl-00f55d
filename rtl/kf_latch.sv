// kf_latch: the track-state store that closes the filter's recursion.
//
// It holds, for every track, the state X = (px, sx, py, sy), the two axis
// covariances P and an info word (one TRK_WORDS-word record, see kf_pkg).
// The write port takes either initial values (init_*, written by the DMA
// when tracks are loaded from external memory) or the output of the update
// step (upd_*), which replaces the record so that the next frame predicts
// from it. The initial-value port has priority when both write in the same
// clock. The read port feeds the prediction step, or the DMA when results are
// written back; read latency is one clock (see bram_sdp).
// The article shows a latch between update and prediction loaded with
// initial values; holding it in block RAM, one record per track, is this
// design's choice.
module kf_latch
  import kf_pkg::*;
#(
  parameter int INT_BITS   = KF_INT_BITS,
  parameter int FRAC_BITS  = KF_FRAC_BITS,
  parameter int MAX_TRACKS = 100,
  localparam int W   = INT_BITS + FRAC_BITS,
  localparam int RW  = TRK_WORDS * W,
  localparam int TAW = (MAX_TRACKS > 1) ? $clog2(MAX_TRACKS) : 1
) (
  input  logic           clk,
  input  logic           init_we,
  input  logic [TAW-1:0] init_addr,
  input  logic [RW-1:0]  init_data,
  input  logic           upd_we,
  input  logic [TAW-1:0] upd_addr,
  input  logic [RW-1:0]  upd_data,
  input  logic           rd_en,
  input  logic [TAW-1:0] rd_addr,
  output logic [RW-1:0]  rd_data
);

  logic           we;
  logic [TAW-1:0] wa;
  logic [RW-1:0]  wd;

  always_comb begin
    we = init_we | upd_we;
    wa = init_we ? init_addr : upd_addr;
    wd = init_we ? init_data : upd_data;
  end

  bram_sdp #(.WIDTH(RW), .DEPTH(MAX_TRACKS)) u_mem (
    .clk,
    .we,
    .wr_addr(wa),
    .wr_data(wd),
    .rd_en,
    .rd_addr,
    .rd_data
  );

endmodule
